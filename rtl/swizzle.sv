// swizzle: operand swizzler (combinational).
//
// Output component c is input component sel[c] (2-bit index), optionally with
// its sign bit inverted. Bit 31 is the sign in both the FLP and the LNS word,
// so negation works for either format.
//
// Interface: v, sel (4 x 2 bits, sel[1:0] for component 0), neg in; o out.
// The source design shows one swizzler per operand in front of the
// multifunction unit; its encoding is this design's own.
module swizzle
  import lgp_pkg::*;
(
  input  vec_t       v,
  input  logic [7:0] sel,
  input  logic       neg,
  output vec_t       o
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      o[c] = v[sel[2*c +: 2]];
      o[c][31] = o[c][31] ^ neg;
    end
  end
endmodule
