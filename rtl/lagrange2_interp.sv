// lagrange2_interp: second stage of the interpolation filter, a x2
// interpolator using a 2nd-order Lagrange polynomial.
//
// The three latest input samples x0 = x(n), x1 = x(n-1), x2 = x(n-2) define a
// parabola; the stage evaluates it half-way between x1 and x0 with the
// published Farrow-style datapath for a fractional delay of 1/2:
//   s1  = x0/2 - x1 + x2/2
//   s2  = -3/2 x0 + 2 x1 - x2/2
//   mid = x0 + (s2 + s1/2) / 2        (= 3/8 x0 + 3/4 x1 - 1/8 x2)
// All halvings are kept exact by computing in units of 1/8; the result is
// rounded half-up and clipped to W bits (both this design's choices, since
// the parabola can overshoot full scale).
// Output order (this design's choice, the published diagram shows only the
// interpolated value): on the in_tick cycle that takes x(n) the stage outputs
// the midpoint between x(n-1) and x(n); on the next out_tick it outputs x(n)
// itself. Timing: out_data is registered on each out_tick, out_valid follows
// one cycle later; in_tick must only be high together with out_tick.
module lagrange2_interp #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_tick,
  input  logic                out_tick,
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] out_data,
  output logic                out_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  import classd_pkg::sat;

  logic signed [W-1:0] x1, x2;
  // Values below are scaled by 8.
  logic signed [W+5:0] s1_8, s2_8, mid_8;
  logic signed [39:0]  mid;

  always_comb begin
    s1_8  = 4 * (W+6)'(in_data) - 8 * (W+6)'(x1) + 4 * (W+6)'(x2);
    s2_8  = -12 * (W+6)'(in_data) + 16 * (W+6)'(x1) - 4 * (W+6)'(x2);
    mid_8 = 8 * (W+6)'(in_data) + ((s2_8 + (s1_8 >>> 1)) >>> 1);
    mid   = (40'(mid_8) + 40'sd4) >>> 3;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1        <= '0;
      x2        <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= out_tick;
      if (out_tick) begin
        if (in_tick) begin
          out_data <= W'(sat(mid, W));
          x1       <= in_data;
          x2       <= x1;
        end else begin
          out_data <= x1;
        end
      end
    end
  end

  a_in_on_out: assert property (@(posedge clk) disable iff (!rst_n) in_tick |-> out_tick);
endmodule
