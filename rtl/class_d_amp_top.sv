// class_d_amp_top: digital class-D audio amplifier with a full-bridge output.
//
// 16-bit PCM at 32 kHz enters the digital modulator (composite interpolation
// filter and 3rd-order delta-sigma modulator), which produces a 1-bit PDM
// stream at 1.024 MHz. The PDM bit drives the gate driver of bridge leg A
// directly and, through an inverter, the gate driver of leg B, so the two
// legs switch in opposite phase and the load between amp_out[0] and
// amp_out[1] sees +-VDD. Each gate driver inserts a dead time so that no leg
// ever has both switches on.
// The gate drivers and the bridge are behavioural models of analog parts
// (delays and levels), so this top simulates but only the digital modulator
// below it is synthesizable. The output LC filter and loudspeaker are not
// modelled.
// Interface: clk is the 32 fs clock, rst_n a synchronous active-low reset;
// pcm_in is taken on the cycle where pcm_req is high. Index 0 of the 2-bit
// outputs is leg A, index 1 leg B. if_out shows the interpolated 16-bit
// stream at 32 fs; leg_floating marks each leg's dead-time intervals.
module class_d_amp_top #(
  parameter int DEAD_TIME_PS = 150
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] pcm_in,
  output logic               pcm_req,
  output logic signed [15:0] if_out,
  output logic               pdm,
  output logic [1:0]         drv_p,
  output logic [1:0]         drv_n,
  output logic [1:0]         amp_out,
  output logic [1:0]         shoot_through,
  output logic [1:0]         leg_floating
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [1:0]         leg_in;

  digital_modulator #(.PCM_W(16)) u_mod (
    .clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .pcm_req(pcm_req),
    .if_out(if_out), .if_valid(), .pdm(pdm)
  );

  assign leg_in[0] = pdm;
  assign leg_in[1] = ~pdm;

  for (genvar i = 0; i < 2; i++) begin : g_leg
    gate_driver #(.DEAD_TIME_PS(DEAD_TIME_PS)) u_drv (
      .in(leg_in[i]), .v_pmos(drv_p[i]), .v_nmos(drv_n[i])
    );
  end

  class_d_bridge u_bridge (
    .v_pmos(drv_p), .v_nmos(drv_n), .out(amp_out),
    .shoot_through(shoot_through), .floating(leg_floating)
  );
endmodule
