// composite_interp_filter: the 5-stage cascaded interpolation filter that
// raises a 16-bit PCM stream from fs to 32 fs.
//
// Stage 1 is the 14-tap direct-form symmetric FIR (fs -> 2 fs), which gives
// the sharp cut-off of the image band; stage 2 is a 2nd-order Lagrange
// interpolator (2 fs -> 4 fs) and stages 3 to 5 are 1st-order Lagrange
// interpolators (4 fs -> 32 fs). Every stage passes a 16-bit word, as the
// published block diagram prints. All stages share one clock at 32 fs; the
// rate_gen enables tell each stage when to produce an output (tick[k]) and
// when to take a new input (tick[k-1]).
// Interface: pcm_req is high for one cycle at fs and pcm_in is sampled on
// that cycle. out_data changes on every clock (out_valid high), i.e. at 32 fs.
// Timing: a PCM sample reaches the output through the stage registers; the
// group delay of the chain is set by the FIR (6.5 input samples) plus one
// register stage per interpolator.
module composite_interp_filter #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] pcm_in,
  output logic                pcm_req,
  output logic signed [W-1:0] out_data,
  output logic                out_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int STAGES = 5;

  logic [STAGES:0]      tick;
  logic signed [W-1:0]  sd [STAGES+1];   // sd[k]: output of stage k (sd[0] = input)
  logic [STAGES:0]      sv;

  rate_gen #(.STAGES(STAGES)) u_rate (
    .clk(clk), .rst_n(rst_n), .tick(tick)
  );

  assign pcm_req = tick[0];
  assign sd[0]   = pcm_in;
  assign sv[0]   = tick[0];

  dfs_fir_interp #(.W(W), .TAPS(14)) u_stage1 (
    .clk(clk), .rst_n(rst_n), .in_tick(tick[0]), .out_tick(tick[1]),
    .in_data(sd[0]), .out_data(sd[1]), .out_valid(sv[1])
  );

  lagrange2_interp #(.W(W)) u_stage2 (
    .clk(clk), .rst_n(rst_n), .in_tick(tick[1]), .out_tick(tick[2]),
    .in_data(sd[1]), .out_data(sd[2]), .out_valid(sv[2])
  );

  for (genvar k = 3; k <= STAGES; k++) begin : g_lin
    lagrange1_interp #(.W(W)) u_stage (
      .clk(clk), .rst_n(rst_n), .in_tick(tick[k-1]), .out_tick(tick[k]),
      .in_data(sd[k-1]), .out_data(sd[k]), .out_valid(sv[k])
    );
  end

  assign out_data  = sd[STAGES];
  assign out_valid = sv[STAGES];
endmodule
