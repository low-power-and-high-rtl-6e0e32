// tb_lagrange2_interp: checks the 2-order Lagrange x2 interpolation stage.
// For every input sample x(n) the stage must output first the midpoint
// between x(n-1) and x(n), then x(n) itself. The midpoint is expected to be
// the value of the parabola through the last three samples
// half-way between the two newest, 3/8 x(n) + 3/4 x(n-1) - 1/8 x(n-2), rounded
// half-up and clipped to 16 bits. A quadratic input (which the 2nd-order
// stage must reproduce exactly) and a full-scale step that overshoots and must
// clip are included, followed by random samples.
// out_tick is high every other cycle and in_tick every fourth cycle; the
// output must appear, with out_valid, one cycle after each out_tick.
module tb_lagrange2_interp;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_IN = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_tick = 1'b0, out_tick = 1'b0;
  logic signed [15:0] in_data = '0;
  logic signed [15:0] out_data;
  logic out_valid;
  int checks = 0, failures = 0, clipped = 0;
  int stim [N_IN];
  longint x0, x1, x2, r;

  lagrange2_interp dut (.clk(clk), .rst_n(rst_n), .in_tick(in_tick), .out_tick(out_tick),
                        .in_data(in_data), .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input longint exp_v, input string what);
    @(posedge clk);
    in_tick  <= 1'b0;
    out_tick <= 1'b0;
    #1;
    checks++;
    if (!out_valid || out_data !== 16'(exp_v)) begin
      failures++;
      if (failures < 10) $display("%s: got %0d (valid %0b), expected %0d", what, out_data, out_valid, exp_v);
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid without out_tick"); end
  endtask

  initial begin
    for (int i = 0; i < 40; i++) stim[i] = (i - 20) * (i - 20) * 40 - 8000;   // parabola
    for (int i = 40; i < 70; i++) stim[i] = -20000 + 1111 * (i - 40);         // ramp
    for (int i = 70; i < 80; i++) stim[i] = -32768;                            // full-scale step
    for (int i = 80; i < 90; i++) stim[i] = 32767;
    for (int i = 90; i < 100; i++) stim[i] = -32768;
    for (int i = 100; i < N_IN; i++) stim[i] = int'($signed(16'($urandom())));
    x1 = 0; x2 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N_IN; i++) begin
      x0 = stim[i];
      // Lagrange parabola through x0, x1, x2 evaluated half-way between x1 and x0
      r = (3 * x0 + 6 * x1 - x2 + 4);
      r = (r >= 0) ? r / 8 : -((-r + 7) / 8);
      if (r > 32767) begin clipped++; r = 32767; end
      if (r < -32768) begin clipped++; r = -32768; end
      in_tick  <= 1'b1;
      out_tick <= 1'b1;
      in_data  <= 16'(stim[i]);
      check_out(r, $sformatf("midpoint before sample %0d", i));
      if ((i > 2 && i < 39 && 2 == 2) || (i > 41 && i < 69)) begin
        // exact polynomial reproduction: midpoint of the underlying curve
        longint ideal2;
        if (i < 40) ideal2 = 2 * 40 * (i - 20) * (i - 20) - 2 * 40 * (i - 20) + 20 - 16000;
        else        ideal2 = -40000 + 2222 * (i - 40) - 1111;
        checks++;
        if (2 * longint'(out_data) - ideal2 > 1 || ideal2 - 2 * longint'(out_data) > 1) begin
          failures++; $display("curve not reproduced at %0d: %0d vs %0d/2", i, out_data, ideal2);
        end
      end
      // second output phase: the sample itself, with new data on the input
      // that must be ignored
      out_tick <= 1'b1;
      in_data  <= 16'($urandom());
      check_out(x0, $sformatf("sample %0d", i));
      x2 = x1; x1 = x0;
    end
    checks++;
    if (clipped == 0) begin failures++; $display("clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
