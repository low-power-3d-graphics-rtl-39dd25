// pmul: programmable multiplier of the multifunction unit (combinational).
//
// One adder tree of NPP operands is shared by three uses:
//  PM_LOG  : a second logarithmic converter, log2 of the FLP operand y
//            (operands: m, three shifted copies of m, b_i from the LOG LUT);
//            the output shifter then divides the log value by 2 when q = 1
//            (square root, used by DSQ).
//  PM_ALOG : an antilogarithmic converter for the LNS operand l
//            (operands: f, two shifted copies of f, b_i from the ALOG LUT).
//  PM_MUL  : a radix-4 Booth multiplier computing y * l, the log-domain
//            multiplication needed by x^y = 2^(y*log2 x); the Booth encoder
//            turns the 24-bit mantissa of y into 13 partial products of l and
//            the output shifter applies the exponent of y.
//
// Interface: mode, y (FLP), l (LNS word), q in; lo (LNS result of PM_LOG and
// PM_MUL) and fo (FLP result of PM_ALOG) out. No clock.
// The three uses, the Booth encoder, the LUTs, the shared adder tree and the
// output shifter follow the source design; widths, saturation and the
// handling of signs and zeros are this design's own.
module pmul
  import lgp_pkg::*;
#(
  parameter int unsigned NPP = 13   // operands of the shared adder tree
) (
  input  logic [1:0] mode,
  input  flp_t       y,
  input  lns_t       l,
  input  logic       q,
  output lns_t       lo,
  output flp_t       fo
);
  localparam logic [1:0] PM_LOG = 2'd0, PM_ALOG = 2'd1, PM_MUL = 2'd2;

  term_t op [NPP];
  term_t t5 [5];
  term_t sum;
  logic [26:0] mb;                  // Booth multiplier bits, {00, 1.m, 0}
  logic [2:0]  grp;
  logic signed [9:0] e2;
  logic signed [71:0] wide;
  logic signed [LNS_W-1:0] prod;
  lns_t lg;

  always_comb begin
    for (int i = 0; i < NPP; i++) op[i] = '0;
    mb = {2'b00, (y[30:23] != 8'd0), y[22:0], 1'b0};
    case (mode)
      PM_LOG: begin
        logc_terms(y[22:0], t5);
        for (int i = 0; i < 5; i++) op[i] = t5[i];
      end
      PM_ALOG: begin
        alogc_terms({l.l[LNS_FRAC-1:0], 2'b00}, t5);
        for (int i = 0; i < 5; i++) op[i] = t5[i];
      end
      default: begin
        // radix-4 Booth recoding of the unsigned 24-bit mantissa
        for (int i = 0; i < NPP; i++) begin
          grp = mb[2*i +: 3];
          case (grp)
            3'b001, 3'b010: op[i] = term_t'(l.l) <<< (2*i);
            3'b011:         op[i] = term_t'(l.l) <<< (2*i + 1);
            3'b100:         op[i] = -(term_t'(l.l) <<< (2*i + 1));
            3'b101, 3'b110: op[i] = -(term_t'(l.l) <<< (2*i));
            default:        op[i] = '0;
          endcase
        end
      end
    endcase
    // shared adder tree
    sum = '0;
    for (int i = 0; i < NPP; i++) sum = sum + op[i];

    // output shifter
    lg   = logc_pack(y, sum);
    e2   = 10'(signed'({2'b00, y[30:23]})) - 10'sd150;   // exponent of y minus 23
    wide = 72'(sum);
    if (y[30:23] == 8'd0)  wide = '0;
    else if (e2 >= 0)      wide = (e2 > 10'sd12) ? ((sum == 0) ? 72'sd0 : (sum < 0 ? -72'sd1 <<< 60 : 72'sd1 <<< 60))
                                                 : (wide <<< e2);
    else                   wide = (e2 < -10'sd70) ? (wide >>> 70) : (wide >>> (-e2));
    if (wide > 72'(LNS_MAX))      prod = LNS_MAX;
    else if (wide < 72'(LNS_MIN)) prod = LNS_MIN;
    else                          prod = wide[LNS_W-1:0];
    if (y[31]) prod = (prod == LNS_MIN) ? LNS_MAX : -prod;

    case (mode)
      PM_LOG:  lo = '{s: lg.s, z: lg.z, l: q ? (lg.l >>> 1) : lg.l};
      PM_MUL:  lo = '{s: 1'b0, z: l.z && !(y[30:23] == 8'd0), l: prod};
      default: lo = '0;
    endcase
    fo = (mode == PM_ALOG) ? alogc_pack(l, sum) : '0;
  end
endmodule
