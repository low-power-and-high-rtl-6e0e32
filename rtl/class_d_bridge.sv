// class_d_bridge: behavioural model of the full-bridge class-D switching
// stage (two legs of a PMOS high-side and an NMOS low-side switch).
// It stands for power transistors and is not synthesizable logic.
//
// For each leg i: the PMOS conducts while v_pmos[i] is low and the NMOS while
// v_nmos[i] is high. out[i] is 1 while the PMOS conducts (leg at the supply)
// and 0 otherwise; floating[i] marks the dead-time intervals in which neither
// switch conducts (the real node is then held by the inductor current), and
// shoot_through[i] marks the fault that the gate driver exists to prevent:
// both switches on at once. The load is connected between out[0] and out[1],
// so the bridge needs no DC blocking capacitor. Levels only are modelled;
// switch sizes, losses and the output LC filter are outside this model.
module class_d_bridge (
  input  logic [1:0] v_pmos,
  input  logic [1:0] v_nmos,
  output logic [1:0] out,
  output logic [1:0] shoot_through,
  output logic [1:0] floating
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      out[i]           = ~v_pmos[i];
      shoot_through[i] = ~v_pmos[i] & v_nmos[i];
      floating[i]      = v_pmos[i] & ~v_nmos[i];
    end
  end
endmodule
