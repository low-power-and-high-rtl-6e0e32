// gate_driver: behavioural model of the analog dead-time gate driver of one
// class-D bridge leg. It is not synthesizable logic: the dead time is a
// delay (150 ps by default), far below the 1.024 MHz modulator clock period.
//
// The leg's PMOS is on while v_pmos is low and its NMOS is on while v_nmos is
// high, so with both gates following the input the leg output is the
// inverse of the input. To avoid shoot-through the driver breaks before it
// makes: v_pmos rises with the input and falls DEAD_TIME_PS after it (its
// high state is stretched at the falling edge), while v_nmos rises
// DEAD_TIME_PS after the input and falls with it, a dead time before v_pmos
// does. Thus on a rising input the PMOS turns off
// at once and the NMOS turns on a dead time later, and on a falling input the
// NMOS turns off at once and the PMOS turns on a dead time later.
// The falling-edge rule and the 150 ps value follow the document; treating
// the rising edges the same way and forming the gates as the OR / AND of the
// input and its delayed copy are this model's choices.
module gate_driver #(
  parameter int DEAD_TIME_PS = 150
) (
  input  logic in,
  output logic v_pmos,
  output logic v_nmos
);
  timeunit 1ns;
  timeprecision 1ps;

  logic in_d;

  assign #(DEAD_TIME_PS * 1ps) in_d = in;
  assign v_pmos = in | in_d;
  assign v_nmos = in & in_d;
endmodule
