// tb_digital_modulator: runs 1 kHz sine waves of 0.1 FS, 0.8 FS and 0.897 FS
// (the largest stable input quoted for this modulator) through the digital
// modulator at fs = 32 kHz, clk = 1.024 MHz, and judges the PDM stream.
// The +-1 bit stream is low-passed with a length-32 sinc^3 filter and
// decimated back to 32 kHz; a least-squares fit of a 1 kHz sine (plus DC)
// over 16 periods gives the reconstructed amplitude and, from the residual,
// the signal-to-noise-and-distortion ratio. The sinc^3 filter leaves part of
// the shaped noise between 8 and 16 kHz in the residual, so the SINAD limits
// (35, 50 and 50 dB) sit below what an audio-band measurement would give.
// The amplitude must be within 2 % of the input times the interpolation
// filter's DC gain (0.9952). pcm_req must come every 32 clocks and the
// interpolated output must stay within the input amplitude plus 3 %.
module tb_digital_modulator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  PER   = 32;             // PCM samples per 1 kHz period
  localparam int  NPCM  = PER * 24;       // 24 ms per level
  localparam int  NCLK  = NPCM * 32;
  localparam real PI    = 3.14159265358979;
  localparam real LEVEL [3] = '{0.1, 0.8, 0.897};
  localparam real MIN_SINAD [3] = '{35.0, 50.0, 50.0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] pcm_in = '0;
  logic pcm_req, if_valid, pdm;
  logic signed [15:0] if_out;
  int checks = 0, failures = 0;
  real bits [NCLK];

  digital_modulator dut (.clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .pcm_req(pcm_req),
                         .if_out(if_out), .if_valid(if_valid), .pdm(pdm));

  always #488.281ns clk = ~clk;

  initial begin
    repeat (4 * NCLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sinc^3 decimation by 32, then sine fit over the last 16 periods
  task automatic analyse(input real level, input real min_sinad);
    real b1 [NCLK], b2 [NCLK], b3 [NCLK];
    real acc, s, c, d, res, amp, sinad;
    int  m;
    for (int pass = 0; pass < 3; pass++) begin
      acc = 0.0;
      for (int i = 0; i < NCLK; i++) begin
        real x;
        x = (pass == 0) ? bits[i] : (pass == 1) ? b1[i] : b2[i];
        acc += x;
        if (i >= 32) acc -= (pass == 0) ? bits[i - 32] : (pass == 1) ? b1[i - 32] : b2[i - 32];
        if (pass == 0) b1[i] = acc / 32.0; else if (pass == 1) b2[i] = acc / 32.0; else b3[i] = acc / 32.0;
      end
    end
    s = 0.0; c = 0.0; d = 0.0; m = 16 * PER;
    for (int k = NPCM - m; k < NPCM; k++) begin
      s += b3[k * 32] * $sin(2.0 * PI * k / PER);
      c += b3[k * 32] * $cos(2.0 * PI * k / PER);
      d += b3[k * 32];
    end
    s = 2.0 * s / m; c = 2.0 * c / m; d = d / m;
    res = 0.0;
    for (int k = NPCM - m; k < NPCM; k++) begin
      real e;
      e = b3[k * 32] - s * $sin(2.0 * PI * k / PER) - c * $cos(2.0 * PI * k / PER) - d;
      res += e * e;
    end
    res = res / m;
    amp = $sqrt(s * s + c * c);
    sinad = 10.0 * $log10(amp * amp / 2.0 / res);
    $display("level %5.3f FS: amplitude %7.5f, SINAD %5.1f dB", level, amp, sinad);
    checks++;
    if (amp < 0.98 * 0.9952 * level || amp > 1.02 * 0.9952 * level) begin
      failures++; $display("amplitude off");
    end
    checks++;
    if (sinad < min_sinad) begin failures++; $display("SINAD below %f dB", min_sinad); end
  endtask

  initial begin
    for (int lv = 0; lv < 3; lv++) begin
      int k, maxabs;
      k = 0; maxabs = 0;
      rst_n <= 1'b0;
      repeat (3) @(posedge clk);
      rst_n <= 1'b1;
      #1;
      for (int i = 0; i < NCLK; i++) begin
        checks++;
        if (pcm_req !== ((i % 32) == 0)) begin failures++; $display("pcm_req wrong at %0d", i); end
        if (pcm_req) begin
          pcm_in = 16'($rtoi(LEVEL[lv] * 32767.0 * $sin(2.0 * PI * k / PER)));
          k++;
        end
        @(posedge clk);
        #1;
        bits[i] = pdm ? 1.0 : -1.0;
        if (int'(if_out) > maxabs) maxabs = int'(if_out);
        if (-int'(if_out) > maxabs) maxabs = -int'(if_out);
      end
      checks++;
      if (maxabs > $rtoi(1.03 * LEVEL[lv] * 32767.0)) begin
        failures++; $display("interpolated peak %0d", maxabs);
      end
      analyse(LEVEL[lv], MIN_SINAD[lv]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
