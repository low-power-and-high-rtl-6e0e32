// classd_pkg: types and constants shared by the digital modulator of the
// class-D amplifier.
//
// The PCM word is 16-bit two's complement with full scale (FS) = 2^15.
// FIR_COEF holds the seven distinct coefficients C1..C7 of the 14-tap
// direct-form symmetric FIR of the first interpolation stage. The published
// values are exact multiples of 2^-16 and all lie below 0.5 in magnitude, so
// each one is stored as a signed 16-bit integer of weight 2^-16
// (C7 = 0.4795989990234375 = 31431 / 65536).
// The delta-sigma modulator coefficients are sums of two powers of two and
// are applied as shifts; DSM_* below give the shift amounts (a coefficient
// 2^-p + 2^-q is written {p, q}). These values follow the published tables.
// sat() clips a wide signed value into W bits, a choice of this design.
package classd_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int PCM_W = 16;
  typedef logic signed [PCM_W-1:0] pcm_t;

  // First-stage FIR: 7 distinct coefficients of a 14-tap symmetric filter.
  localparam int FIR_HALF   = 7;
  localparam int FIR_COEF_W = 16;
  localparam int FIR_COEF_FRAC = 16;
  typedef logic signed [FIR_COEF_W-1:0] fir_coef_t;
  localparam fir_coef_t FIR_COEF [FIR_HALF] = '{
    -16'sd642,    // C1 = -0.009796142578125
    -16'sd22,     // C2 = -0.000335693359375
     16'sd2282,   // C3 =  0.034820556640625
    -16'sd1000,   // C4 = -0.0152587890625
    -16'sd6250,   // C5 = -0.095367431640625
     16'sd6812,   // C6 =  0.10394287109375
     16'sd31431   // C7 =  0.4795989990234375
  };

  // DSM coefficients as shift pairs: value = 2^-p + 2^-q.
  typedef struct packed {
    logic [3:0] p;
    logic [3:0] q;
  } shift2_t;
  localparam shift2_t DSM_A1 = '{p: 4'd4, q: 4'd6};  // 1/16 + 1/64
  localparam shift2_t DSM_A2 = '{p: 4'd3, q: 4'd5};  // 1/8  + 1/32
  localparam shift2_t DSM_A3 = '{p: 4'd2, q: 4'd4};  // 1/4  + 1/16
  localparam shift2_t DSM_B1 = '{p: 4'd4, q: 4'd6};  // 1/16 + 1/64
  localparam shift2_t DSM_C1 = '{p: 4'd3, q: 4'd5};  // 1/8  + 1/32
  localparam shift2_t DSM_C2 = '{p: 4'd2, q: 4'd3};  // 1/4  + 1/8
  localparam int      DSM_G1_SHIFT = 8;              // g1 = 1/256, c3 = 1

  // Clip a 40-bit signed value into a W-bit signed range (W <= 32).
  function automatic logic signed [39:0] sat(input logic signed [39:0] v, input int w);
    logic signed [39:0] hi, lo;
    hi = (40'sd1 <<< (w - 1)) - 40'sd1;
    lo = -(40'sd1 <<< (w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction
endpackage
