// tb_class_d_bridge: checks the full-bridge switch model exhaustively.
// For each leg and each of the four gate combinations the leg output must
// be high exactly when the PMOS conducts (gate low), shoot_through must flag
// both switches on and floating must flag both off; the two legs must not
// affect each other.
module tb_class_d_bridge;
  timeunit 1ns;
  timeprecision 1ps;

  logic [1:0] v_pmos = '0, v_nmos = '0;
  logic [1:0] out, shoot_through, floating;
  int checks = 0, failures = 0;

  class_d_bridge dut (.v_pmos(v_pmos), .v_nmos(v_nmos), .out(out),
                      .shoot_through(shoot_through), .floating(floating));

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      {v_pmos, v_nmos} = 4'(c);
      #1;
      for (int i = 0; i < 2; i++) begin
        logic pon, non;
        pon = (v_pmos[i] == 1'b0);
        non = (v_nmos[i] == 1'b1);
        checks++;
        if (out[i] !== pon || shoot_through[i] !== (pon && non) || floating[i] !== (!pon && !non)) begin
          failures++;
          $display("leg %0d p=%b n=%b: out=%b st=%b fl=%b", i, v_pmos[i], v_nmos[i],
                   out[i], shoot_through[i], floating[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
