// tb_if_response: measures the amplitude response of the interpolation
// filter on the RTL. For input tones of 1, 4, 6 and 8 kHz at 0.5 FS
// (fs = 32 kHz) the 32 fs output is fitted with a sine at the tone and at
// its first images (32 kHz -/+ f). Expected from the filter's coefficients:
// passband gain between -0.25 dB and +0.05 dB up to 8 kHz (-0.04 dB at low
// frequency, -0.19 dB at 8 kHz with the droop of the linear stages) and
// images at least 55 dB below the tone.
module tb_if_response;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  NPCM = 32 * 40;
  localparam int  SKIP = 32 * 8;           // settling, in PCM samples
  localparam real PI = 3.14159265358979;
  localparam real FT [4] = '{1000.0, 4000.0, 6000.0, 8000.0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] pcm_in = '0;
  logic pcm_req, out_valid;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;
  real y [NPCM * 32];

  composite_interp_filter dut (.clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .pcm_req(pcm_req),
                               .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (8 * NPCM * 32) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // amplitude of a least-squares sine fit at frequency f (Hz) over y[from..]
  // (frequencies here give whole periods over the window, so sin and cos are
  // orthogonal)
  function automatic real fit(real f, int from);
    real s = 0.0, c = 0.0;
    int n = NPCM * 32 - from;
    for (int i = from; i < NPCM * 32; i++) begin
      s += y[i] * $sin(2.0 * PI * f * i / 1024000.0);
      c += y[i] * $cos(2.0 * PI * f * i / 1024000.0);
    end
    return 2.0 * $sqrt(s * s + c * c) / n;
  endfunction

  initial begin
    for (int t = 0; t < 4; t++) begin
      int k;
      real a, img, g_db, i_db;
      k = 0;
      rst_n <= 1'b0;
      repeat (3) @(posedge clk);
      rst_n <= 1'b1;
      #1;
      for (int c = 0; c < NPCM * 32; c++) begin
        if (pcm_req) begin
          pcm_in = 16'($rtoi(0.5 * 32767.0 * $sin(2.0 * PI * FT[t] * k / 32000.0)));
          k++;
        end
        @(posedge clk);
        #1;
        y[c] = real'(out_data) / (0.5 * 32767.0);
      end
      a   = fit(FT[t], SKIP * 32);
      img = fit(32000.0 - FT[t], SKIP * 32);
      if (fit(32000.0 + FT[t], SKIP * 32) > img) img = fit(32000.0 + FT[t], SKIP * 32);
      g_db = 20.0 * $log10(a);
      i_db = 20.0 * $log10(img / a);
      $display("tone %5.0f Hz: gain %7.3f dB, image %6.1f dB", FT[t], g_db, i_db);
      checks++;
      if (g_db < -0.25 || g_db > 0.05) begin failures++; $display("passband gain out of range"); end
      checks++;
      if (i_db > -55.0) begin failures++; $display("image not attenuated enough"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
