// rate_gen: sample-rate enables for the cascaded interpolation filter.
//
// The whole digital modulator runs from one clock at the highest rate,
// 32 fs = 1.024 MHz for fs = 32 kHz. A free-running STAGES-bit counter divides
// it; tick[k] is a one-cycle enable at 2^k fs (tick[0] at fs, tick[STAGES] on
// every cycle). tick[k] is high when the low STAGES-k counter bits are zero,
// so every slower enable falls on a cycle where all faster ones are high too.
// The filter stages rely on that alignment: stage k runs on tick[k] and takes
// a new input sample on tick[k-1]. The document gives the rates (fs, 2fs, 4fs,
// 32fs); the single clock with enables is this design's choice.
// Timing: tick is decoded from the counter register, so tick[0] is high in
// the first cycle after reset and every 2^STAGES cycles after that.
module rate_gen #(
  parameter int STAGES = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [STAGES:0]   tick
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [STAGES-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    for (int k = 0; k <= STAGES; k++) begin
      logic [STAGES-1:0] mask;
      mask    = STAGES'((1 << (STAGES - k)) - 1);
      tick[k] = ((cnt & mask) == '0);
    end
  end
endmodule
