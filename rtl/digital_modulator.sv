// digital_modulator: the digital half of the class-D amplifier, from 16-bit
// PCM at fs = 32 kHz to a 1-bit pulse-density (PDM) stream at 32 fs.
//
// The composite interpolation filter raises the rate by 32 and the
// 3rd-order delta-sigma modulator turns each 16-bit sample at 1.024 MHz into
// one bit. Both run from clk = 32 fs; the filter's output register changes on
// every clock and the modulator advances on every clock.
// Interface: pcm_in is sampled on the cycle pcm_req is high (every 32
// cycles). if_out/if_valid expose the interpolated stream for observation.
// Timing: pdm is a registered output that changes once per clock.
module digital_modulator #(
  parameter int PCM_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [PCM_W-1:0] pcm_in,
  output logic                    pcm_req,
  output logic signed [PCM_W-1:0] if_out,
  output logic                    if_valid,
  output logic                    pdm
);
  timeunit 1ns;
  timeprecision 1ps;

  composite_interp_filter #(.W(PCM_W)) u_if (
    .clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .pcm_req(pcm_req),
    .out_data(if_out), .out_valid(if_valid)
  );

  dsm3 #(.IN_W(PCM_W)) u_dsm (
    .clk(clk), .rst_n(rst_n), .en(if_valid), .in_data(if_out), .pdm(pdm)
  );
endmodule
