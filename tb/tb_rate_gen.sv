// tb_rate_gen: checks the sample-rate enables of rate_gen.
// Over 8 frames of 32 cycles it checks that tick[k] is high exactly once
// every 2^(5-k) cycles, that the first tick[0] comes in the first cycle after
// reset, and that a slow enable is only ever high together with all faster
// ones (tick[k] -> tick[k+1]).
module tb_rate_gen;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int STAGES = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [STAGES:0] tick;
  int checks = 0, failures = 0;
  int count [STAGES+1];
  int last  [STAGES+1];

  rate_gen dut (.clk(clk), .rst_n(rst_n), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= STAGES; k++) begin count[k] = 0; last[k] = -1; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    #1;
    checks++;
    if (tick !== '1) begin failures++; $display("first cycle after reset: tick=%b", tick); end
    for (int cyc = 0; cyc < 256; cyc++) begin
      for (int k = 0; k <= STAGES; k++) begin
        if (tick[k]) begin
          if (last[k] >= 0) begin
            checks++;
            if (cyc - last[k] != (1 << (STAGES - k))) begin
              failures++;
              $display("tick[%0d] period %0d at cycle %0d", k, cyc - last[k], cyc);
            end
          end
          last[k] = cyc;
          count[k]++;
        end
        if (k < STAGES && tick[k]) begin
          checks++;
          if (!tick[k+1]) begin failures++; $display("tick[%0d] without tick[%0d]", k, k+1); end
        end
      end
      @(posedge clk);
      #1;
    end
    for (int k = 0; k <= STAGES; k++) begin
      checks++;
      if (count[k] != 256 >> (STAGES - k)) begin
        failures++;
        $display("tick[%0d] count %0d", k, count[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
