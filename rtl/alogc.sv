// alogc: antilogarithmic converter, LNS -> FLP (combinational).
//
// A log value x = k + f (k integer, 0 <= f < 1) gives 2^x = 2^f << k. The
// fraction 2^f is approximated piecewise linearly as a_i*f + b_i: the top
// three fraction bits select one of 8 table entries whose slope is 1 plus two
// signed powers of two, so a_i*f is f plus two shifted copies of f. The sum is
// clamped into [1,2) and becomes the mantissa; k + 127 becomes the exponent.
// Exponents below 1 flush to zero, above 254 saturate to the largest number.
//
// Interface: x (LNS word {s,z,l}) in, y (binary32 layout) out, no clock.
// The table structure (8 entries, shift terms c/d, offset b) follows the
// source design; the table values are this design's own minimax fit (peak
// relative error 0.079 %, matching the 0.08 % quoted for the original).
module alogc
  import lgp_pkg::*;
(
  input  lns_t x,
  output flp_t y
);
  term_t t [5];
  term_t sum;

  always_comb begin
    alogc_terms({x.l[LNS_FRAC-1:0], 2'b00}, t);
    sum = t[0] + t[1] + t[2] + t[3];
    y   = alogc_pack(x, sum);
  end
endmodule
