// tb_dsm3: checks the 3rd-order delta-sigma modulator.
// A reference model of the loop equations (states in units of 2^-23 FS,
// coefficients 2^-p + 2^-q applied as floor divisions, output +-FS, states
// clipped to 28 bits) runs beside the design and every output bit must
// match. Independently of that model, the mean of the bit stream over 8192
// clocks must equal the DC input (0, +0.5 FS, -0.7 FS) within 0.01 FS, and a
// 1 kHz sine of 0.8 FS at 1.024 MHz is run bit-exact as well. en is dropped
// for some cycles, during which pdm must hold.
module tb_dsm3;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [15:0] in_data = '0;
  logic pdm;
  int checks = 0, failures = 0, mismatches = 0;
  longint s1, s2, s3;
  localparam longint FS = 64'sd1 <<< 23;
  localparam longint LIM = 64'sd1 <<< 27;

  dsm3 dut (.clk(clk), .rst_n(rst_n), .en(en), .in_data(in_data), .pdm(pdm));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fdiv(longint x, int p);   // floor(x / 2^p)
    longint d = 64'sd1 <<< p;
    return (x >= 0) ? x / d : -((-x + d - 1) / d);
  endfunction
  function automatic longint cl(longint x);
    return (x > LIM - 1) ? LIM - 1 : (x < -LIM) ? -LIM : x;
  endfunction

  // one modulator step of the reference; returns the output bit
  function automatic bit ref_step(longint u16);
    longint u = u16 * 256;
    longint v = (s3 >= 0) ? FS : -FS;
    longint n1, n2, n3;
    n1 = s1 + fdiv(u, 4) + fdiv(u, 6) - (fdiv(v, 4) + fdiv(v, 6));
    n2 = s2 + fdiv(s1, 3) + fdiv(s1, 5) - fdiv(s3, 8) - (fdiv(v, 3) + fdiv(v, 5));
    n3 = s3 + fdiv(s2, 2) + fdiv(s2, 3) - (fdiv(v, 2) + fdiv(v, 4));
    s1 = cl(n1); s2 = cl(n2); s3 = cl(n3);
    return v > 0;
  endfunction

  task automatic run(input int n, input int kind, input real amp);
    longint ones = 0;
    real mean;
    for (int i = 0; i < n; i++) begin
      bit exp_bit;
      longint u;
      if (kind == 0) u = longint'($rtoi(amp * 32768.0));
      else u = longint'($rtoi(amp * 32767.0 * $sin(2.0 * 3.14159265358979 * 1000.0 * i / 1024000.0)));
      in_data <= 16'(u);
      en      <= ((i % 97) != 50);
      #1;
      exp_bit = (s3 >= 0);
      checks++;
      if (pdm !== exp_bit) begin mismatches++; failures++; end
      if ((i % 97) != 50) begin
        void'(ref_step(u));
        ones += exp_bit;
      end
      @(posedge clk);
    end
    mean = (2.0 * ones - (n - n / 97)) / (n - n / 97);
    if (kind == 0) begin
      checks++;
      if (mean - amp > 0.01 || amp - mean > 0.01) begin
        failures++; $display("DC %f: bit-stream mean %f", amp, mean);
      end
      $display("DC input %f -> mean %f", amp, mean);
    end
  endtask

  initial begin
    s1 = 0; s2 = 0; s3 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(8192, 0, 0.0);
    run(8192, 0, 0.5);
    run(8192, 0, -0.7);
    run(16384, 1, 0.8);
    if (mismatches != 0) $display("%0d bits differ from the reference", mismatches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
