// tb_class_d_amp_top: end-to-end run of the whole amplifier at its default
// parameters: a 1 kHz sine of 0.8 FS as 16-bit PCM at 32 kHz, clk = 1.024 MHz,
// 24 ms of audio (24576 clocks).
// Checked: pcm_req once every 32 clocks; the interpolated stream stays within
// the input level; the two bridge legs switch in opposite phase (sampled in
// the middle of each clock period); every leg transition passes through a
// dead-time interval in which both switches are off, measured as 150 ps;
// no shoot-through ever; and the differential bridge output, low-passed with
// a sinc^3 filter and decimated to 32 kHz, reproduces the sine with the
// expected amplitude and a SINAD of at least 50 dB.
// Mechanisms counted (each must occur): PCM requests, PDM rising and falling
// edges, dead-time intervals on leg A and on leg B.
module tb_class_d_amp_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  PER  = 32;
  localparam int  NPCM = PER * 24;
  localparam int  NCLK = NPCM * 32;
  localparam real PI   = 3.14159265358979;
  localparam real LEVEL = 0.8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] pcm_in = '0;
  logic pcm_req, pdm;
  logic signed [15:0] if_out;
  logic [1:0] drv_p, drv_n, amp_out, shoot_through, leg_floating;
  int checks = 0, failures = 0;
  int n_req = 0, n_rise = 0, n_fall = 0, n_shoot = 0, n_badgap = 0;
  int n_dead [2];
  bit armed = 1'b0;          // monitors count only after reset release
  realtime t_start [2];
  real diffv [NCLK];

  class_d_amp_top dut (.clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .pcm_req(pcm_req),
                       .if_out(if_out), .pdm(pdm), .drv_p(drv_p), .drv_n(drv_n),
                       .amp_out(amp_out), .shoot_through(shoot_through),
                       .leg_floating(leg_floating));

  always #488.281ns clk = ~clk;

  initial begin
    repeat (2 * NCLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge shoot_through[0] or posedge shoot_through[1]) n_shoot++;
  always @(posedge pdm) if (armed) n_rise++;
  always @(negedge pdm) if (armed) n_fall++;
  for (genvar i = 0; i < 2; i++) begin : g_mon
    always @(posedge leg_floating[i]) t_start[i] = $realtime;
    always @(negedge leg_floating[i]) if (armed) begin
      n_dead[i]++;
      if ($realtime - t_start[i] < 0.149 || $realtime - t_start[i] > 0.151) n_badgap++;
    end
  end

  initial begin
    int k, maxabs;
    real b [3][NCLK];
    real acc, s, c, d, res, amp, sinad;
    int m;
    n_dead[0] = 0; n_dead[1] = 0; t_start[0] = 0.0; t_start[1] = 0.0;
    k = 0; maxabs = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    #1;
    armed = 1'b1;
    for (int i = 0; i < NCLK; i++) begin
      checks++;
      if (pcm_req !== ((i % 32) == 0)) begin failures++; $display("pcm_req wrong at %0d", i); end
      if (pcm_req) begin
        pcm_in = 16'($rtoi(LEVEL * 32767.0 * $sin(2.0 * PI * k / PER)));
        k++; n_req++;
      end
      @(negedge clk);
      // middle of the clock period: legs settled, in opposite phase
      checks++;
      if (amp_out[0] === amp_out[1] || leg_floating !== 2'b00) begin
        failures++;
        if (failures < 10) $display("legs not complementary at %0d: %b", i, amp_out);
      end
      diffv[i] = (amp_out[1] && !amp_out[0]) ? 1.0 : -1.0;
      if (int'(if_out) > maxabs) maxabs = int'(if_out);
      if (-int'(if_out) > maxabs) maxabs = -int'(if_out);
      @(posedge clk);
      #1;
    end
    checks++;
    if (maxabs > $rtoi(1.03 * LEVEL * 32767.0)) begin failures++; $display("IF peak %0d", maxabs); end
    // sinc^3 decimation and sine fit over the last 16 periods
    for (int p = 0; p < 3; p++) begin
      acc = 0.0;
      for (int i = 0; i < NCLK; i++) begin
        acc += (p == 0) ? diffv[i] : b[p - 1][i];
        if (i >= 32) acc -= (p == 0) ? diffv[i - 32] : b[p - 1][i - 32];
        b[p][i] = acc / 32.0;
      end
    end
    s = 0.0; c = 0.0; d = 0.0; m = 16 * PER;
    for (int j = NPCM - m; j < NPCM; j++) begin
      s += b[2][j * 32] * $sin(2.0 * PI * j / PER);
      c += b[2][j * 32] * $cos(2.0 * PI * j / PER);
      d += b[2][j * 32];
    end
    s = 2.0 * s / m; c = 2.0 * c / m; d = d / m;
    res = 0.0;
    for (int j = NPCM - m; j < NPCM; j++) begin
      real e;
      e = b[2][j * 32] - s * $sin(2.0 * PI * j / PER) - c * $cos(2.0 * PI * j / PER) - d;
      res += e * e;
    end
    res = res / m;
    amp = $sqrt(s * s + c * c);
    sinad = 10.0 * $log10(amp * amp / 2.0 / res);
    $display("bridge output: amplitude %7.5f, SINAD %5.1f dB", amp, sinad);
    checks++;
    if (amp < 0.98 * 0.9952 * LEVEL || amp > 1.02 * 0.9952 * LEVEL) begin failures++; $display("amplitude off"); end
    checks++;
    if (sinad < 50.0) begin failures++; $display("SINAD too low"); end
    // dead time and shoot-through
    $display("pcm requests %0d, pdm edges %0d/%0d, dead-time intervals A %0d B %0d, shoot-through %0d",
             n_req, n_rise, n_fall, n_dead[0], n_dead[1], n_shoot);
    checks++;
    if (n_shoot != 0) begin failures++; $display("shoot-through occurred"); end
    checks++;
    if (n_badgap != 0) begin failures++; $display("%0d dead-time intervals not 150 ps", n_badgap); end
    checks++;
    // each PDM edge gives one dead-time interval per leg (the edge at
    // reset release, or an interval still open at the end, may differ by one)
    if (n_dead[0] - (n_rise + n_fall) > 1 || (n_rise + n_fall) - n_dead[0] > 1 ||
        n_dead[1] - (n_rise + n_fall) > 1 || (n_rise + n_fall) - n_dead[1] > 1) begin
      failures++; $display("dead-time count does not match PDM edges");
    end
    foreach (n_dead[i]) begin
      checks++;
      if (n_dead[i] == 0) begin failures++; $display("no dead time on leg %0d", i); end
    end
    checks++;
    if (n_req != NPCM || n_rise == 0 || n_fall == 0) begin failures++; $display("mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
