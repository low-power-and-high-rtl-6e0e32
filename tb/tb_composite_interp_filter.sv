// tb_composite_interp_filter: checks the 5-stage interpolation chain.
// A sample-level reference builds the 32 fs sequence from the PCM input:
// stage 1 is a plain 14-tap convolution of the zero-stuffed input with
// h = C1..C7,C7..C1 (gain 2, rounded, clipped), stage 2 emits for each input
// the value 3/8 x(n) + 3/4 x(n-1) - 1/8 x(n-2) (rounded, clipped) and then
// x(n), stages 3 to 5 emit floor((x(n) + x(n-1))/2) and then x(n).
// The design's output, one word per clock, must equal that sequence delayed
// by exactly 31 clocks after the pcm_req cycle of the first sample. Also
// checked: pcm_req once every 32 clocks, out_valid on every clock, the DC
// gain of the chain, and a full-scale square wave that makes stages 1 and 2
// clip.
module tb_composite_interp_filter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NPCM = 160;
  localparam int LAT  = 31;
  localparam real CR [7] = '{-0.009796142578125, -0.000335693359375, 0.034820556640625,
                             -0.0152587890625, -0.095367431640625, 0.10394287109375,
                             0.4795989990234375};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] pcm_in = '0;
  logic pcm_req;
  logic signed [15:0] out_data;
  logic out_valid;
  int checks = 0, failures = 0, clips = 0;
  int pcm [NPCM];
  longint h [14];
  longint s0 [$], s1 [$], s2 [$], s3 [$];
  int cap [NPCM * 32 + LAT + 8];

  composite_interp_filter dut (.clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .pcm_req(pcm_req),
                               .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip16(longint v);
    if (v > 32767)  begin clips++; return 32767;  end
    if (v < -32768) begin clips++; return -32768; end
    return v;
  endfunction
  function automatic longint fdiv(longint x, longint d);
    return (x >= 0) ? x / d : -((-x + d - 1) / d);
  endfunction

  // x2 linear interpolation of a sequence
  function automatic void lin(ref longint src [$], ref longint dst [$]);
    longint p = 0;
    dst.delete();
    foreach (src[i]) begin
      dst.push_back(fdiv(src[i] + p, 2));
      dst.push_back(src[i]);
      p = src[i];
    end
  endfunction

  initial begin
    longint z [$];
    for (int i = 0; i < 7; i++) begin
      h[i] = longint'($rtoi(CR[i] * 65536.0)); h[13 - i] = h[i];
    end
    for (int k = 0; k < 40; k++)  pcm[k] = $rtoi(0.8 * 32767.0 * $sin(2.0 * 3.14159265358979 * k / 32.0));
    for (int k = 40; k < 80; k++) pcm[k] = 12000;                            // DC
    for (int k = 80; k < 110; k++) pcm[k] = ((k / 4) % 2) ? 32767 : -32768;  // square, clips
    for (int k = 110; k < NPCM; k++) pcm[k] = int'($signed(16'($urandom())));

    // stage 1 reference
    for (int k = 0; k < NPCM; k++) begin z.push_back(pcm[k]); z.push_back(0); end
    foreach (z[n]) begin
      longint acc;
      acc = 0;
      for (int j = 0; j < 14; j++) if (n - j >= 0) acc += h[j] * z[n - j];
      s0.push_back(clip16((acc + 16384) >>> 15));
    end
    // stage 2 reference
    begin
      longint a1 = 0, a2 = 0;
      foreach (s0[n]) begin
        s1.push_back(clip16(fdiv(3 * s0[n] + 6 * a1 - a2 + 4, 8)));
        s1.push_back(s0[n]);
        a2 = a1; a1 = s0[n];
      end
    end
    lin(s1, s2); lin(s2, s3); lin(s3, s1);   // s1 now holds the 32 fs output

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    #1;
    for (int c = 0; c < NPCM * 32 + LAT + 4; c++) begin
      checks++;
      if (pcm_req !== ((c % 32) == 0)) begin failures++; $display("pcm_req wrong at cycle %0d", c); end
      if (pcm_req) pcm_in = 16'(pcm[c / 32 < NPCM ? c / 32 : 0]);
      if (c > 0) begin
        checks++;
        if (!out_valid) begin failures++; $display("out_valid low at cycle %0d", c); end
      end
      cap[c] = int'(out_data);
      @(posedge clk);
      #1;
    end
    for (int m = 0; m < NPCM * 32; m++) begin
      checks++;
      if (longint'(cap[m + LAT]) != s1[m]) begin
        failures++;
        if (failures < 10) $display("output %0d: got %0d expected %0d", m, cap[m + LAT], s1[m]);
      end
    end
    // DC gain 2*sum(h) = 0.99521 at the end of the DC segment
    checks++;
    if (cap[79 * 32 + LAT] < 11930 || cap[79 * 32 + LAT] > 11955) begin
      failures++; $display("DC gain: %0d for 12000", cap[79 * 32 + LAT]);
    end
    checks++;
    if (clips == 0) begin failures++; $display("no clipping exercised"); end
    $display("reference clips: %0d", clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
