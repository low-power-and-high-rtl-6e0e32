// lagrange1_interp: one of the three last stages of the interpolation
// filter, a x2 interpolator using a 1st-order Lagrange (linear) polynomial.
//
// As in the published diagram the midpoint is formed as
//   mid = x(n) + (x(n-1) - x(n)) / 2
// with one subtractor, one halving and one adder. The halving is an
// arithmetic right shift (rounds toward minus infinity), this design's
// choice. The midpoint always lies between the two samples, so it cannot
// overflow.
// Output order (this design's choice): on the in_tick cycle that takes x(n)
// the stage outputs the midpoint between x(n-1) and x(n); on the next out_tick
// it outputs x(n). Timing: out_data is registered on each out_tick and
// out_valid follows one cycle later; in_tick must only be high with out_tick.
module lagrange1_interp #(
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

  logic signed [W-1:0] x1;
  logic signed [W:0]   diff;
  logic signed [W-1:0] mid;

  always_comb begin
    diff = (W+1)'(x1) - (W+1)'(in_data);
    // The sum lies between the two samples, so its top bit is redundant.
    mid  = W'((W+1)'(in_data) + (diff >>> 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1        <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= out_tick;
      if (out_tick) begin
        if (in_tick) begin
          out_data <= mid;
          x1       <= in_data;
        end else begin
          out_data <= x1;
        end
      end
    end
  end

  a_in_on_out: assert property (@(posedge clk) disable iff (!rst_n) in_tick |-> out_tick);
endmodule
