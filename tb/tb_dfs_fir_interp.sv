// tb_dfs_fir_interp: checks the first interpolation stage against a plain
// (unfolded) 14-tap convolution of the zero-stuffed input.
// The reference taps are h = C1..C7,C7..C1 scaled by 2^16, taken from the
// real coefficient values; the output is expected to be
// clip16(round(sum h[j]*x[n-j] / 2^15)). Inputs: an impulse (the output must
// then show 2*h), a DC level (passband gain), a worst-case sign pattern that
// must clip, and random samples. out_tick is high every other cycle and
// in_tick every fourth, and out_valid must follow out_tick by one cycle.
module tb_dfs_fir_interp;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_IN = 400;
  localparam real CR [7] = '{-0.009796142578125, -0.000335693359375, 0.034820556640625,
                             -0.0152587890625, -0.095367431640625, 0.10394287109375,
                             0.4795989990234375};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_tick = 1'b0, out_tick = 1'b0;
  logic signed [15:0] in_data = '0;
  logic signed [15:0] out_data;
  logic out_valid;

  int checks = 0, failures = 0, clipped = 0;
  longint h [14];
  longint hist [$];          // zero-stuffed input, newest first
  int stim [N_IN];

  dfs_fir_interp dut (.clk(clk), .rst_n(rst_n), .in_tick(in_tick), .out_tick(out_tick),
                      .in_data(in_data), .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected();
    longint acc = 0, r;
    for (int j = 0; j < 14; j++) acc += h[j] * hist[j];
    r = acc + (64'sd1 <<< 14);
    r = r >>> 15;
    if (r > 32767)  begin clipped++; r = 32767;  end
    if (r < -32768) begin clipped++; r = -32768; end
    return int'(r);
  endfunction

  initial begin
    for (int i = 0; i < 7; i++) begin
      h[i]      = longint'($rtoi(CR[i] * 65536.0));
      h[13 - i] = h[i];
    end
    for (int j = 0; j < 14; j++) hist.push_back(0);
    // Stimulus: impulse, DC, clipping pattern, random.
    for (int i = 0; i < N_IN; i++) stim[i] = 0;
    stim[0] = 16384;
    for (int i = 20; i < 60; i++) stim[i] = 20000;
    for (int i = 80; i < 100; i++) stim[i] = 32767;
    // sign pattern matching the even-phase taps drives the sum past FS
    for (int i = 110; i < 140; i++)
      stim[i] = (h[2 * ((i - 110) % 7)] >= 0) ? 32767 : -32768;
    for (int i = 150; i < N_IN; i++) stim[i] = int'($signed(16'($urandom())));

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N_IN; i++) begin
      for (int ph = 0; ph < 2; ph++) begin
        int exp_v;
        // out_tick cycle (with in_tick on phase 0)
        in_tick  <= (ph == 0);
        out_tick <= 1'b1;
        in_data  <= (ph == 0) ? 16'(stim[i]) : 16'($urandom());
        hist.push_front((ph == 0) ? longint'(stim[i]) : 0);
        void'(hist.pop_back());
        exp_v = expected();
        @(posedge clk);
        in_tick  <= 1'b0;
        out_tick <= 1'b0;
        #1;
        checks++;
        if (!out_valid || out_data !== 16'(exp_v)) begin
          failures++;
          if (failures < 10)
            $display("in %0d ph %0d: got %0d valid %0b, expected %0d", i, ph, out_data, out_valid, exp_v);
        end
        // impulse response: output must be 2*h, rounded
        if (i < 7) begin
          checks++;
          if (out_data !== 16'((2 * 16384 * h[2 * i + ph] + 32768) >>> 16)) begin
            failures++;
            $display("impulse tap %0d: got %0d", 2 * i + ph, out_data);
          end
        end
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin failures++; $display("out_valid without out_tick"); end
      end
      // DC gain after settling: 2*sum(h)/65536 = 0.99521
      if (i == 55) begin
        checks++;
        if (out_data < 19890 || out_data > 19920) begin
          failures++; $display("DC gain: got %0d for 20000", out_data);
        end
      end
    end
    checks++;
    if (clipped == 0) begin failures++; $display("clipping never exercised"); end
    $display("clipped outputs: %0d", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
