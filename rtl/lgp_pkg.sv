// lgp_pkg: number formats, operation codes, converter tables and shared
// arithmetic helpers of the logarithmic vertex-shader datapath.
//
// Linear-domain numbers (FLP) use the IEEE-754 binary32 layout with a
// simplified rule set chosen for this design: exponent 0 means zero (no
// subnormals), results never use exponent 255 (no inf/NaN; an input with
// exponent 255 is read as an ordinary number),
// results are truncated and saturate at 0x7F7FFFFF.
//
// Log-domain numbers (LNS) are 32-bit words {s, z, l}: s is the sign of the
// linear value, z flags a linear zero, and l is log2|x| as a signed fixed-point
// number with 9 integer and 21 fraction bits (Q9.21). Bit 31 is the sign in
// both formats, so a swizzler can negate either with one bit flip.
//
// The converter tables hold piecewise-linear fits: each segment stores the
// slope as 1 plus up to three (LOGC) or two (ALOGC) signed powers of two, so
// a_i*m is a shift-and-add, plus an offset b_i with 23 fraction bits. The
// values were obtained by a minimax fit per segment: for every candidate slope
// a = 1 +/- 2^-c +/- 2^-d (+/- 2^-e), b = (max(e)+min(e))/2 with
// e(m) = g(m) - a*m, keeping the slope with the smallest peak error; g(m) is
// log2(1+m) for LOGC and 2^m for ALOGC. Peak error of the fits: 4.5e-4 in
// log2 (0.03 %) for LOGC, 0.079 % relative for ALOGC.
package lgp_pkg;

  localparam int unsigned LNS_FRAC = 21;   // fraction bits of the LNS log value
  localparam int unsigned LNS_W    = 30;   // width of the LNS log value
  localparam int unsigned NCH      = 4;    // channels of the vector datapath

  typedef logic [31:0] flp_t;
  typedef logic [NCH-1:0][31:0] vec_t;     // [channel] of 32-bit words

  typedef struct packed {
    logic                    s;  // sign of the linear value
    logic                    z;  // linear value is zero
    logic signed [LNS_W-1:0] l;  // log2|x|, Q9.21
  } lns_t;

  localparam logic signed [LNS_W-1:0] LNS_MAX = {1'b0, {(LNS_W-1){1'b1}}};
  localparam logic signed [LNS_W-1:0] LNS_MIN = {1'b1, {(LNS_W-1){1'b0}}};
  localparam flp_t FLP_MAX = 32'h7F7F_FFFF;

  // Multifunction-unit operations.
  typedef enum logic [3:0] {
    OP_NOP = 4'd0,
    OP_ADD = 4'd1,   // x +/- y, linear domain only
    OP_MUL = 4'd2,   // x * y
    OP_DIV = 4'd3,   // x / y
    OP_DSQ = 4'd4,   // x / sqrt(y)
    OP_MAD = 4'd5,   // x * y +/- z
    OP_DOT = 4'd6,   // sum_i x_i * y_i, broadcast to all channels
    OP_MAT = 4'd7,   // matrix-vector product, two phases, y/z = LNS columns
    OP_POW = 4'd8,   // x ^ y per channel
    OP_ELM = 4'd9,   // x3 + sum_i 2^(C_i + k_i*log2 x0), k_i = y_i, C_i = z_i (LNS)
    OP_LOG = 4'd10,  // log2 x as FLP
    OP_LNS = 4'd11,  // LNS word of x (pre-conversion of coefficients)
    OP_CRS = 4'd12   // cross product x.yzx*y.zxy - x.zxy*y.yzx, two phases, w = 0
  } mfu_op_e;

  // ---------------------------------------------------------------- tables
  typedef struct packed {
    logic [0:2][3:0] sh;   // shift of each extra slope term, 0 = term unused
    logic [2:0]      neg;  // term is subtracted (bit i for term i)
    logic [23:0]     b;    // offset, 23 fraction bits
  } logc_ent_t;

  typedef struct packed {
    logic [0:1][3:0] sh;
    logic [1:0]      neg;
    logic [24:0]     b;    // offset in [1,2), 23 fraction bits
  } alogc_ent_t;

  // 15 segments of log2(1+m): entry i covers m in [i/16,(i+1)/16), entry 14
  // covers [14/16, 1).
  localparam logc_ent_t LOGC_LUT [15] = '{
    '{sh: '{4'd1, 4'd3, 4'd5}, neg: 3'b010, b: 24'd170},
    '{sh: '{4'd2, 4'd4, 4'd7}, neg: 3'b000, b: 24'd43580},
    '{sh: '{4'd0, 4'd2, 4'd9}, neg: 3'b100, b: 24'd118971},
    '{sh: '{4'd2, 4'd4, 4'd8}, neg: 3'b110, b: 24'd220179},
    '{sh: '{4'd3, 4'd10, 4'd12}, neg: 3'b000, b: 24'd340474},
    '{sh: '{4'd4, 4'd6, 4'd8}, neg: 3'b100, b: 24'd476481},
    '{sh: '{4'd5, 4'd8, 4'd10}, neg: 3'b110, b: 24'd626704},
    '{sh: '{4'd0, 4'd6, 4'd9}, neg: 3'b110, b: 24'd787817},
    '{sh: '{4'd4, 4'd8, 4'd10}, neg: 3'b001, b: 24'd955609},
    '{sh: '{4'd3, 4'd5, 4'd10}, neg: 3'b101, b: 24'd1130613},
    '{sh: '{4'd0, 4'd3, 4'd8}, neg: 3'b110, b: 24'd1309761},
    '{sh: '{4'd3, 4'd5, 4'd8}, neg: 3'b111, b: 24'd1489793},
    '{sh: '{4'd2, 4'd4, 4'd9}, neg: 3'b101, b: 24'd1673789},
    '{sh: '{4'd2, 4'd5, 4'd10}, neg: 3'b001, b: 24'd1866723},
    '{sh: '{4'd2, 4'd8, 4'd10}, neg: 3'b111, b: 24'd2141327}
  };

  // 8 segments of 2^f: entry i covers f in [i/8,(i+1)/8).
  localparam alogc_ent_t ALOGC_LUT [8] = '{
    '{sh: '{4'd2, 4'd5}, neg: 2'b11, b: 25'd8388566},
    '{sh: '{4'd2, 4'd5}, neg: 2'b01, b: 25'd8330470},
    '{sh: '{4'd3, 4'd6}, neg: 2'b11, b: 25'd8169981},
    '{sh: '{4'd4, 4'd9}, neg: 2'b01, b: 25'd7917961},
    '{sh: '{4'd5, 4'd7}, neg: 2'b10, b: 25'd7565287},
    '{sh: '{4'd3, 4'd7}, neg: 2'b10, b: 25'd7073241},
    '{sh: '{4'd2, 4'd5}, neg: 2'b10, b: 25'd6433001},
    '{sh: '{4'd2, 4'd4}, neg: 2'b00, b: 25'd5755066}
  };

  // Width of the operands of the shift-add / Booth adder trees.
  localparam int unsigned TW = 58;
  typedef logic signed [TW-1:0] term_t;

  // One signed shift-add term: +/- (v >> sh), or 0 when sh == 0.
  function automatic term_t sa_term(input logic [23:0] v, input logic [3:0] sh, input logic neg);
    term_t t;
    t = term_t'({34'd0, v} >> sh);
    if (sh == 4'd0) t = '0;
    return neg ? -t : t;
  endfunction

  // Operands of a_i*m + b_i for LOGC; m has 23 fraction bits.
  function automatic void logc_terms(input logic [22:0] m, output term_t t [5]);
    logc_ent_t e;
    logic [3:0] seg;
    seg = m[22:19];
    e   = LOGC_LUT[(seg == 4'd15) ? 4'd14 : seg];
    t[0] = term_t'({35'd0, m});
    for (int i = 0; i < 3; i++) t[i+1] = sa_term({1'b0, m}, e.sh[i], e.neg[i]);
    t[4] = term_t'({34'd0, e.b});
  endfunction

  // Operands of a_i*f + b_i for ALOGC; f has 23 fraction bits.
  function automatic void alogc_terms(input logic [22:0] f, output term_t t [5]);
    alogc_ent_t e;
    e = ALOGC_LUT[f[22:20]];
    t[0] = term_t'({35'd0, f});
    for (int i = 0; i < 2; i++) t[i+1] = sa_term({1'b0, f}, e.sh[i], e.neg[i]);
    t[3] = term_t'({33'd0, e.b});
    t[4] = '0;
  endfunction

  // LOGC back end: integer exponent plus the shift-add sum (23 fraction bits).
  function automatic lns_t logc_pack(input flp_t x, input term_t sum);
    lns_t r;
    logic signed [LNS_W-1:0] k;
    k   = LNS_W'(signed'({1'b0, x[30:23]}) - 10'sd127);
    r.s = x[31];
    r.z = (x[30:23] == 8'd0);
    r.l = (k <<< LNS_FRAC) + LNS_W'(sum >>> 2);
    return r;
  endfunction

  // ALOGC back end: clamp the mantissa sum to [1,2) and attach 2^k.
  function automatic flp_t alogc_pack(input lns_t a, input term_t sum);
    logic signed [9:0] e;
    logic [22:0]       mant;
    e = 10'(a.l >>> LNS_FRAC) + 10'sd127;
    if (sum < term_t'(24'h80_0000))        mant = '0;
    else if (sum >= term_t'(25'h100_0000)) mant = '1;
    else                                    mant = sum[22:0];
    if (a.z || e <= 0) return '0;
    if (e > 10'sd254)  return {a.s, FLP_MAX[30:0]};
    return {a.s, e[7:0], mant};
  endfunction

  // Saturating Q9.21 addition of two log values.
  function automatic logic signed [LNS_W-1:0] lsat_add(input logic signed [LNS_W-1:0] a,
                                                       input logic signed [LNS_W-1:0] b,
                                                       input logic sub);
    logic signed [LNS_W:0] s;
    s = sub ? ((LNS_W+1)'(a) - (LNS_W+1)'(b)) : ((LNS_W+1)'(a) + (LNS_W+1)'(b));
    if (s > (LNS_W+1)'(LNS_MAX)) return LNS_MAX;
    if (s < (LNS_W+1)'(LNS_MIN)) return LNS_MIN;
    return s[LNS_W-1:0];
  endfunction

  // Signed Q9.21 fixed point to FLP (truncating).
  function automatic flp_t fix_to_flp(input logic signed [LNS_W-1:0] v);
    logic [LNS_W-1:0] mag;
    logic [LNS_W-1:0] norm;
    int               msb;
    mag = v[LNS_W-1] ? LNS_W'(-v) : LNS_W'(v);
    msb = -1;
    for (int i = 0; i < LNS_W; i++) if (mag[i]) msb = i;
    if (msb < 0) return '0;
    norm = mag << (LNS_W - 1 - msb);
    return {v[LNS_W-1], 8'(127 + msb - LNS_FRAC), norm[LNS_W-2 -: 23]};
  endfunction


  // ------------------------------------------------------- shader program
  // Opcodes 0..12 are the multifunction-unit operations (same codes as
  // mfu_op_e); the others are executed by the shader's control.
  typedef enum logic [4:0] {
    V_NOP = 5'd0,  V_ADD = 5'd1,  V_MUL = 5'd2,  V_DIV = 5'd3,
    V_DSQ = 5'd4,  V_MAD = 5'd5,  V_DOT = 5'd6,  V_MAT = 5'd7,
    V_POW = 5'd8,  V_ELM = 5'd9,  V_LOG = 5'd10, V_LNS = 5'd11,
    V_CRS = 5'd12,
    V_LDM   = 5'd16,  // constant[dst] <= next matrix-FIFO word
    V_STC   = 5'd17,  // constant[dst] <= src0 (masked)
    V_WAITV = 5'd18,  // wait until the VIB holds a vertex
    V_END   = 5'd19   // hand the VOB over, release the VIB, jump to target
  } vs_op_e;

  typedef enum logic [1:0] {B_GPR = 2'd0, B_CMEM = 2'd1, B_VIB = 2'd2} src_bank_e;

  localparam logic [7:0] SWZ_XYZW = 8'b11_10_01_00;

  typedef struct packed {
    src_bank_e  bank;
    logic [7:0] addr;
    logic [7:0] swz;   // 2 bits per component, component 0 in bits [1:0]
    logic       neg;
  } src_t;

  // 128-bit instruction word
  typedef struct packed {
    logic [44:0] rsvd;
    logic [6:0]  target;   // END: next pc
    src_t        src2;
    src_t        src1;
    src_t        src0;
    logic [3:0]  wmask;
    logic [7:0]  dst;      // register (GPR/VOB) or constant address
    logic        dst_vob;  // 1: write the VOB, 0: write a GPR
    logic        sub;      // final addition is a subtraction
    vs_op_e      op;
  } instr_t;

  // one-cycle event flags of the vertex shader, for performance monitoring
  typedef struct packed {
    logic fwd;       // an operation issued with log-domain forwarding
    logic hazard;    // issue held back by a register dependency
    logic mat;       // a MAT phase issued
    logic mf_wait;   // LDM waiting for the matrix FIFO
    logic vtx_wait;  // WAITV waiting for a vertex
    logic vob_wait;  // END waiting for the rendering engine to take the VOB
  } vs_ev_t;

endpackage
