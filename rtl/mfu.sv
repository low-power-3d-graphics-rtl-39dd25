// mfu: logarithmic multifunction unit, four channels, five stages E1..E5.
//
// Every operation is built from the same chain: convert operands to the log
// domain, combine them there (add, subtract, shift, multiply), convert back,
// then finish with linear-domain additions.
//   E1  LOGC on x in every channel.
//   E2  PMUL: LOG converter for y (vector ops, >>1 for square root), Booth
//       multiplier y*log2 x (POW, ELM) or, for MAT, ANTILOG converter of
//       log c + log x_j after the E2 log-domain adder.
//   E3  log-domain adder (x (+/-) y, bias + k*log2 x, or the second MAT
//       product) followed by ALOGC. The adder output is also kept as the
//       log-domain forwarding value.
//   E4  PADD: per-channel FLP add of z (MAD), of the two MAT products, or a
//       four/five term reduction tree (DOT, ELM).
//   E5  ACC: MAT adds the sums of its two phases.
// Operations (lgp_pkg::mfu_op_e): ADD, MUL, DIV, DSQ, MAD, DOT, MAT, POW, ELM,
// LOG, LNS, CRS. MAT takes two issue cycles (phase 0 uses x0,x1 and the LNS
// matrix columns 0,1 on y,z; phase 1 uses x2,x3 and columns 2,3); it writes
// once. CRS (cross product) also takes two issue cycles with the same x and y:
// phase 0 forms x.yzx*y.zxy on the MUL path, phase 1 x.zxy*y.yzx, and ACC
// subtracts the second from the first; channel 3 gives 0.
//
// Timing: an operation presented with in_valid in cycle t appears on
// out_valid in cycle t+5; a MAT or CRS whose phase 1 is presented in cycle
// t+1 appears in cycle t+6. One operation (or MAT phase) per cycle, no stalls.
// Log-domain forwarding: with in_fwd = 1 the x operand of a MUL, DIV, DSQ,
// MAD or DOT is not taken from its LOGC output but from the log-domain
// result of the operation issued one cycle earlier (which must be MUL, DIV,
// DSQ or POW, i.e. have no final linear addition); the issuer guarantees this.
//
// The stage split, the unit assignment per operation, the MAT phase scheme,
// the latencies and log-domain forwarding follow the source design. Sign and
// zero rules (POW and ELM use |x|, the sign of an ELM term is the sign of its
// bias C_i, the extra ELM term c0*x^k0 comes in on x3), the LOG/LNS outputs,
// the bypass of PADD for operations without a final addition, and the
// two-phase CRS on the MUL path and ACC are this design's own (the source
// lists crs among the vector operations without saying how it runs).
module mfu
  import lgp_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  mfu_op_e          in_op,
  input  logic             in_phase,  // MAT phase
  input  logic             in_sub,    // final addition is a subtraction
  input  logic             in_fwd,    // use the forwarded log value for x
  input  vec_t             in_x,
  input  vec_t             in_y,
  input  vec_t             in_z,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output vec_t             out_res,
  output logic [TAG_W-1:0] out_tag
);
  typedef struct packed {
    logic             v;
    mfu_op_e          op;
    logic             ph;
    logic             sub;
    logic             fwd;
    logic [TAG_W-1:0] tag;
  } ctl_t;

  localparam logic [1:0] PM_LOG = 2'd0, PM_ALOG = 2'd1, PM_MUL = 2'd2;

  // CRS operand rotations: phase 0 uses x.yzx and y.zxy, phase 1 x.zxy and
  // y.yzx; channel 3 keeps its own component in both phases.
  function automatic int unsigned rot(input int unsigned c, input int unsigned k);
    return (c == 3) ? 3 : (c + k) % 3;
  endfunction

  // ------------------------------------------------------------------ E1
  flp_t xs [4];
  lns_t lx1 [4];
  always_comb begin
    for (int c = 0; c < 4; c++) xs[c] = in_x[c];
    if (in_op == OP_MAT) begin
      xs[0] = in_phase ? in_x[2] : in_x[0];
      xs[1] = in_phase ? in_x[3] : in_x[1];
    end
    if (in_op == OP_CRS)
      for (int unsigned c = 0; c < 4; c++) xs[c] = in_x[rot(c, in_phase ? 2 : 1)];
  end
  for (genvar c = 0; c < 4; c++) begin : g_logc
    logc u_logc (.x(xs[c]), .y(lx1[c]));
  end

  ctl_t c2;
  lns_t lx2 [4];
  vec_t x2, y2, z2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c2 <= '0;
    else        c2 <= '{v: in_valid, op: in_op, ph: in_phase, sub: in_sub, fwd: in_fwd, tag: in_tag};
  end
  always_ff @(posedge clk) begin
    for (int c = 0; c < 4; c++) lx2[c] <= lx1[c];
    x2 <= in_x; y2 <= in_y; z2 <= in_z;
  end

  // ------------------------------------------------------------------ E2
  logic [1:0] pm_mode;
  vec_t       yr2;
  lns_t       pm_l  [4];
  lns_t       pm_lo [4];
  flp_t       pm_fo [4];
  always_comb begin
    case (c2.op)
      OP_MAT:         pm_mode = PM_ALOG;
      OP_POW, OP_ELM: pm_mode = PM_MUL;
      default:        pm_mode = PM_LOG;
    endcase
    yr2 = y2;
    if (c2.op == OP_CRS)
      for (int unsigned c = 0; c < 4; c++) yr2[c] = y2[rot(c, c2.ph ? 1 : 2)];
    for (int c = 0; c < 4; c++) begin
      lns_t cy;
      cy = lns_t'(y2[c]);
      case (c2.op)
        OP_MAT:  pm_l[c] = '{s: cy.s ^ lx2[0].s, z: cy.z | lx2[0].z, l: lsat_add(cy.l, lx2[0].l, 1'b0)};
        OP_ELM:  pm_l[c] = lx2[0];
        default: pm_l[c] = lx2[c];
      endcase
    end
  end
  for (genvar c = 0; c < 4; c++) begin : g_pmul
    pmul u_pmul (.mode(pm_mode), .y(yr2[c]), .l(pm_l[c]), .q(c2.op == OP_DSQ),
                 .lo(pm_lo[c]), .fo(pm_fo[c]));
  end

  ctl_t c3;
  lns_t lx3 [4];
  lns_t pl3 [4];
  vec_t pf3, x3, y3, z3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c3 <= '0;
    else        c3 <= c2;
  end
  always_ff @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      lx3[c] <= lx2[c];
      pl3[c] <= pm_lo[c];
      pf3[c] <= pm_fo[c];
    end
    x3 <= x2; y3 <= y2; z3 <= z2;
  end

  // ------------------------------------------------------------------ E3
  lns_t s3 [4];   // log-domain result
  lns_t s4 [4];   // registered, the forwarding source
  flp_t al3 [4];
  vec_t p3;
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      lns_t lxu, cz;
      lxu = c3.fwd ? s4[c] : lx3[c];
      cz  = lns_t'(z3[c]);
      case (c3.op)
        OP_MAT: s3[c] = '{s: cz.s ^ lx3[1].s, z: cz.z | lx3[1].z, l: lsat_add(cz.l, lx3[1].l, 1'b0)};
        OP_DIV, OP_DSQ:
                s3[c] = '{s: lxu.s ^ pl3[c].s, z: lxu.z,
                          l: pl3[c].z ? LNS_MAX : lsat_add(lxu.l, pl3[c].l, 1'b1)};
        OP_POW: s3[c] = pl3[c];
        OP_ELM: s3[c] = '{s: cz.s, z: cz.z | pl3[c].z, l: lsat_add(cz.l, pl3[c].l, 1'b0)};
        default:
                s3[c] = '{s: lxu.s ^ pl3[c].s, z: lxu.z | pl3[c].z, l: lsat_add(lxu.l, pl3[c].l, 1'b0)};
      endcase
    end
  end
  for (genvar c = 0; c < 4; c++) begin : g_alogc
    alogc u_alogc (.x(s3[c]), .y(al3[c]));
  end
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      case (c3.op)
        OP_ADD:  p3[c] = x3[c];
        OP_LNS:  p3[c] = lx3[c];
        OP_LOG:  p3[c] = lx3[c].z ? {1'b1, FLP_MAX[30:0]} : fix_to_flp(lx3[c].l);
        default: p3[c] = al3[c];
      endcase
    end
  end

  ctl_t c4;
  vec_t p4, b4;
  flp_t e4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c4 <= '0;
    else        c4 <= c3;
  end
  always_ff @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      s4[c] <= s3[c];
      case (c3.op)
        OP_MAT:  b4[c] <= pf3[c];
        OP_MAD:  b4[c] <= z3[c];
        OP_ADD:  b4[c] <= y3[c];
        default: b4[c] <= '0;
      endcase
    end
    p4 <= p3;
    e4 <= (c3.op == OP_ELM) ? x3[3] : '0;
  end

  // ------------------------------------------------------------------ E4
  vec_t pa4, r4;
  padd u_padd (.a(p4), .b(b4), .sub({4{c4.sub}}), .tree(c4.op == OP_DOT || c4.op == OP_ELM),
               .e(e4), .r(pa4));
  always_comb begin
    case (c4.op)
      OP_ADD, OP_MAD, OP_DOT, OP_MAT, OP_ELM: r4 = pa4;
      default:                                r4 = p4;
    endcase
  end

  ctl_t c5;
  vec_t r5, acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c5 <= '0;
    else        c5 <= c4;
  end
  always_ff @(posedge clk) r5 <= r4;

  // ------------------------------------------------------------------ E5
  vec_t accsum;
  for (genvar c = 0; c < 4; c++) begin : g_acc
    flp_add u_acc (.a(acc[c]), .b(r5[c]), .sub(c5.op == OP_CRS), .r(accsum[c]));
  end
  always_ff @(posedge clk) begin
    if (c5.v && c5.op inside {OP_MAT, OP_CRS} && !c5.ph) acc <= r5;
    out_res <= (c5.op inside {OP_MAT, OP_CRS}) ? accsum : r5;
    out_tag <= c5.tag;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c5.v && !(c5.op inside {OP_MAT, OP_CRS} && !c5.ph);
  end

  // A MAT or CRS phase 1 must directly follow its phase 0.
  a_mat_pair: assert property (@(posedge clk) disable iff (!rst_n)
    (c2.v && c2.op inside {OP_MAT, OP_CRS} && c2.ph) |-> (c3.v && c3.op == c2.op && !c3.ph));
  // Forwarding needs a producer without final addition one stage ahead.
  a_fwd_src: assert property (@(posedge clk) disable iff (!rst_n)
    (c3.v && c3.fwd) |-> (c4.v && c4.op inside {OP_MUL, OP_DIV, OP_DSQ, OP_POW}));
endmodule
