// dsm3: 3rd-order single-bit digital delta-sigma modulator.
//
// Loop topology (as published): three delaying integrators in a chain with
// feedback of the output bit into every integrator input (CIFB), input
// feed-in b1 at the first integrator, and a resonator path -g1 from the third
// integrator's output back into the second integrator's input:
//   s1' = s1 + b1*u     - a1*v
//   s2' = s2 + c1*s1    - g1*s3 - a2*v
//   s3' = s3 + c2*s2    - a3*v
//   v   = +FS if c3*s3 >= 0 else -FS       (c3 = 1, b2 = b3 = b4 = 0)
// The coefficients are the published shift-add values
// (a1 = b1 = 1/16+1/64, a2 = c1 = 1/8+1/32, a3 = 1/4+1/16, c2 = 1/4+1/8,
// g1 = 1/256), so every product is two shifts and one add.
// The document does not give word widths. Here the states carry FRAC extra
// fractional bits below the 16-bit input LSB and are ACC_W bits wide
// (+-16 FS at the defaults); states clip instead of wrapping. Shifted terms
// truncate toward minus infinity. These are this design's choices.
// Interface: in_data is 16-bit two's complement with FS = 2^15; pdm = 1
// means +FS. Timing: the loop advances on each cycle with en high; pdm is
// decoded from the s3 register, so it changes right after the clock edge
// and reflects the state before the sample in_data of that edge.
module dsm3
  import classd_pkg::*;
#(
  parameter int IN_W  = 16,
  parameter int FRAC  = 8,
  parameter int ACC_W = 28
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   pdm
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef logic signed [ACC_W-1:0] acc_t;
  localparam acc_t FS = acc_t'(1) <<< (IN_W - 1 + FRAC);

  function automatic acc_t mul2(input acc_t x, input shift2_t c);
    return (x >>> c.p) + (x >>> c.q);
  endfunction

  function automatic acc_t clip(input logic signed [ACC_W+1:0] x);
    return acc_t'(sat(40'(x), ACC_W));
  endfunction

  acc_t s1, s2, s3;
  acc_t u, fb1, fb2, fb3;
  logic signed [ACC_W+1:0] n1, n2, n3;

  assign pdm = ~s3[ACC_W-1];   // c3 = 1: quantizer sees s3 directly

  always_comb begin
    u   = acc_t'(in_data) <<< FRAC;
    fb1 = mul2(FS, DSM_A1);
    fb2 = mul2(FS, DSM_A2);
    fb3 = mul2(FS, DSM_A3);
    n1  = (ACC_W+2)'(s1) + (ACC_W+2)'(mul2(u, DSM_B1))
          + (pdm ? -(ACC_W+2)'(fb1) : (ACC_W+2)'(fb1));
    n2  = (ACC_W+2)'(s2) + (ACC_W+2)'(mul2(s1, DSM_C1)) - (ACC_W+2)'(s3 >>> DSM_G1_SHIFT)
          + (pdm ? -(ACC_W+2)'(fb2) : (ACC_W+2)'(fb2));
    n3  = (ACC_W+2)'(s3) + (ACC_W+2)'(mul2(s2, DSM_C2))
          + (pdm ? -(ACC_W+2)'(fb3) : (ACC_W+2)'(fb3));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else if (en) begin
      s1 <= clip(n1);
      s2 <= clip(n2);
      s3 <= clip(n3);
    end
  end
endmodule
