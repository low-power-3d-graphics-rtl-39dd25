// padd: programmable adder of the multifunction unit (combinational).
//
// Four floating-point adders, one per channel. With tree = 0 each channel
// adds its own pair, r_i = a_i +/- b_i. With tree = 1 input multiplexers chain
// the same four adders into a reduction tree:
//   channel 0 adds a0 + a1, channel 3 adds a2 + a3,
//   channel 1 adds the two partial sums,
//   channel 2 adds that total and an extra term e.
// The tree serves the dot product (e = 0) and the five-term series of the
// elementary functions (e = c0*x^k0). The final sum is given on all four
// outputs.
//
// Interface: a, b (vectors), sub (per channel, tree = 0 only), tree, e in;
// r out. No clock.
// The adder-per-channel arrangement and the tree connections follow the
// source design's figure; broadcasting the tree result is this design's choice.
module padd
  import lgp_pkg::*;
(
  input  vec_t       a,
  input  vec_t       b,
  input  logic [3:0] sub,
  input  logic       tree,
  input  flp_t       e,
  output vec_t       r
);
  flp_t s0, s1, s2, s3;

  // level 1 of the tree: channels 0 and 3
  flp_add u_add0 (.a(a[0]), .b(tree ? a[1] : b[0]), .sub(!tree && sub[0]), .r(s0));
  flp_add u_add3 (.a(tree ? a[2] : a[3]), .b(tree ? a[3] : b[3]), .sub(!tree && sub[3]), .r(s3));
  // level 2: channel 1
  flp_add u_add1 (.a(tree ? s0 : a[1]), .b(tree ? s3 : b[1]), .sub(!tree && sub[1]), .r(s1));
  // level 3: channel 2
  flp_add u_add2 (.a(tree ? s1 : a[2]), .b(tree ? e : b[2]), .sub(!tree && sub[2]), .r(s2));

  assign r = tree ? {s2, s2, s2, s2} : {s3, s2, s1, s0};
endmodule
