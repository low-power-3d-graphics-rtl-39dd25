// flp_add: floating-point adder/subtractor, r = a + b or a - b (combinational).
//
// Operands use the binary32 layout with this design's simplified rules:
// exponent 0 is zero, no subnormals, no inf/NaN, truncation, saturation at the
// largest finite magnitude. The smaller operand is aligned to the larger one
// with three extra low bits, the magnitudes are added or subtracted, and the
// result is renormalised by a leading-one search.
//
// Interface: a, b, sub in; r out. No clock.
// The source design only states that linear additions are done in floating
// point; the format details and the adder structure are this design's own.
module flp_add
  import lgp_pkg::*;
(
  input  flp_t a,
  input  flp_t b,
  input  logic sub,
  output flp_t r
);
  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [26:0] ml, ms, msh;      // 1.23 mantissa plus 3 low bits
  logic [27:0] sum;
  logic [7:0]  d;
  int          msb;
  logic signed [9:0] en;
  logic [27:0] norm;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    // order by magnitude
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sl = sa; el = ea; ml = {(ea != 0), a[22:0], 3'b000};
      ss = sb; es = eb; ms = {(eb != 0), b[22:0], 3'b000};
    end else begin
      sl = sb; el = eb; ml = {(eb != 0), b[22:0], 3'b000};
      ss = sa; es = ea; ms = {(ea != 0), a[22:0], 3'b000};
    end
    d   = el - es;
    msh = (es == 8'd0 || d > 8'd26) ? 27'd0 : (ms >> d);
    sum = (sl == ss) ? ({1'b0, ml} + {1'b0, msh}) : ({1'b0, ml} - {1'b0, msh});
    msb = -1;
    for (int i = 0; i < 28; i++) if (sum[i]) msb = i;
    en   = 10'(el) + 10'(msb) - 10'sd26;
    norm = (msb < 0) ? 28'd0 : (sum << (27 - msb));
    if (el == 8'd0 || msb < 0 || en <= 0) r = '0;
    else if (en > 10'sd254)                r = {sl, FLP_MAX[30:0]};
    else                                   r = {sl, en[7:0], norm[26:4]};
    if (el == 8'd0 && es == 8'd0) r = '0;
  end
endmodule
