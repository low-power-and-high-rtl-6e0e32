// dfs_fir_interp: first stage of the interpolation filter, a x2 interpolator
// built as a 14-tap direct-form symmetric (DFS) FIR filter.
//
// The stage runs at its output rate (2 fs). On a cycle with in_tick the new
// input sample enters the delay line; on the other output cycle a zero enters
// instead (zero insertion). The 14 taps are folded: the sample at tap i and
// the one at tap 13-i are added first and then multiplied by the shared
// coefficient C(i+1), so seven multipliers serve fourteen taps, as in the
// published structure. Coefficients C1..C7 are the published 16-bit values.
// Zero insertion halves the signal level, so the sum is scaled by 2 (the
// products are shifted right by 15 instead of 16); the passband gain is then
// 2 * sum(h) = 0.9952. That gain of 2, round-half-up and clipping to 16 bits
// are choices of this design.
// Interface: in_tick (input rate) must only be high together with out_tick
// (output rate). Timing: out_data is registered on every out_tick cycle and
// out_valid is high the cycle after; the output for a new input sample
// appears one clock after the in_tick cycle that took it.
module dfs_fir_interp
  import classd_pkg::*;
#(
  parameter int W    = 16,
  parameter int TAPS = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_tick,
  input  logic                out_tick,
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] out_data,
  output logic                out_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int HALF = TAPS / 2;

  // dly[i] holds x(n-1-i); x(n) is the sample entering this cycle.
  logic signed [W-1:0] dly [TAPS-1];
  logic signed [W-1:0] x0;
  logic signed [W-1:0] tap [TAPS];
  logic signed [W:0]   pre [HALF];
  logic signed [39:0]  acc;
  logic signed [39:0]  scaled;

  assign x0 = in_tick ? in_data : '0;

  always_comb begin
    tap[0] = x0;
    for (int i = 1; i < TAPS; i++) tap[i] = dly[i-1];
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < HALF; i++) begin
      pre[i] = (W+1)'(tap[i]) + (W+1)'(tap[TAPS-1-i]);
      acc    = acc + 40'(pre[i]) * 40'(FIR_COEF[i]);
    end
    // x2 interpolation gain: weight 2^-16 coefficients, shift by 15.
    scaled = (acc + (40'sd1 <<< (FIR_COEF_FRAC - 2))) >>> (FIR_COEF_FRAC - 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS-1; i++) dly[i] <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= out_tick;
      if (out_tick) begin
        dly[0] <= x0;
        for (int i = 1; i < TAPS-1; i++) dly[i] <= dly[i-1];
        out_data <= W'(sat(scaled, W));
      end
    end
  end

  // The input rate must be a sub-rate of the output rate.
  a_in_on_out: assert property (@(posedge clk) disable iff (!rst_n) in_tick |-> out_tick);
endmodule
