// logc: logarithmic converter, FLP -> LNS (combinational).
//
// x = 2^k (1+m) gives log2 x = k + log2(1+m). The fraction log2(1+m) is
// approximated piecewise linearly as a_i*m + b_i. The top four mantissa bits
// select one of 15 table entries (the last two sixteenths share entry 14).
// The slope a_i is 1 plus three signed powers of two, so the product a_i*m is
// formed from m and three shifted copies of m; these and b_i are summed (two
// carry-save levels and a carry-propagate adder in the original circuit,
// an adder expression here). The integer part k is attached afterwards.
//
// Interface: x (binary32 layout) in, y (LNS word {s,z,l}) out, no clock.
// The table structure (15 entries, shift terms c/d/e, offset b) follows the
// source design; the segment boundaries and table values are this design's
// own minimax fit (peak error 0.03 %, inside the 0.41 % bound quoted for the
// original converter).
module logc
  import lgp_pkg::*;
(
  input  flp_t x,
  output lns_t y
);
  term_t t [5];
  term_t sum;

  always_comb begin
    logc_terms(x[22:0], t);
    sum = t[0] + t[1] + t[2] + t[3] + t[4];
    y   = logc_pack(x, sum);
  end
endmodule
