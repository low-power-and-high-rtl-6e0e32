// tb_gate_driver: checks the dead-time gate driver model.
// The input toggles with random high and low times of 1 to 20 ns. After a
// rising input the PMOS gate must go high (PMOS off) at once and the NMOS
// gate must stay low for the dead time and then go high; after a falling
// input the NMOS gate must go low at once and the PMOS gate must stay high for
// the dead time. The gap between the two gate edges is measured and must be
// 150 ps, and a monitor counts any instant with both switches on.
module tb_gate_driver;
  timeunit 1ns;
  timeprecision 1ps;

  logic in = 1'b0;
  logic v_pmos, v_nmos;
  int checks = 0, failures = 0, shoot = 0;
  realtime t_p, t_n;

  gate_driver dut (.in(in), .v_pmos(v_pmos), .v_nmos(v_nmos));

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(v_pmos, v_nmos) if (!v_pmos && v_nmos) shoot++;
  always @(posedge v_pmos) t_p = $realtime;
  always @(negedge v_pmos) t_p = $realtime;
  always @(posedge v_nmos) t_n = $realtime;
  always @(negedge v_nmos) t_n = $realtime;

  task automatic expect2(input logic p, input logic n, input string what);
    checks++;
    if (v_pmos !== p || v_nmos !== n) begin
      failures++;
      if (failures < 10) $display("%t %s: v_pmos=%b v_nmos=%b", $realtime, what, v_pmos, v_nmos);
    end
  endtask

  initial begin
    #2;
    expect2(1'b0, 1'b0, "idle low input");
    for (int i = 0; i < 200; i++) begin
      in = 1'b1;
      #0.001 expect2(1'b1, 1'b0, "just after rise");
      #0.148 expect2(1'b1, 1'b0, "end of rise dead time");
      #0.002 expect2(1'b1, 1'b1, "after rise dead time");
      checks++;
      if (t_n - t_p < 0.149 || t_n - t_p > 0.151) begin
        failures++; $display("rise dead time %f ns", t_n - t_p);
      end
      #(1 + ($urandom % 20));
      in = 1'b0;
      #0.001 expect2(1'b1, 1'b0, "just after fall");
      #0.148 expect2(1'b1, 1'b0, "end of fall dead time");
      #0.002 expect2(1'b0, 1'b0, "after fall dead time");
      checks++;
      if (t_p - t_n < 0.149 || t_p - t_n > 0.151) begin
        failures++; $display("fall dead time %f ns", t_p - t_n);
      end
      #(1 + ($urandom % 20));
    end
    checks++;
    if (shoot != 0) begin failures++; $display("shoot-through seen %0d times", shoot); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
