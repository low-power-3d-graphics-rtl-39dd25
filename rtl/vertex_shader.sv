// vertex_shader: programmable vertex shader built around the logarithmic
// multifunction unit.
//
// Storage: instruction memory (128 x 128-bit words = 2 KB), general-purpose
// registers (32 x 4 x 32 bits = 512 B), constant memory (256 x 128 bits =
// 4 KB, holds matrices in LNS form and other constants), vertex input buffer
// (VIB, 32 x 128 bits = 512 B, written by the vertex fetch unit) and vertex
// output buffer (VOB, 16 x 128 bits = 256 B, read by the rendering engine).
// Three operands are read per instruction; each can come from the GPRs, the
// constant memory or the VIB and passes a swizzler (component select and
// negate) on its way to the multifunction unit (mfu).
//
// Control: one instruction is fetched, decoded and issued per cycle; the mfu
// returns its result 5 cycles later (MAT and CRS: two issue cycles, result
// 6 cycles after the first) and it is written to a GPR or the VOB under a component
// mask. A scoreboard of the five in-flight results holds an instruction back
// while one of its GPR operands is still being computed. The exception is
// log-domain forwarding: when the instruction issued in the previous cycle is
// a MUL, DIV, DSQ or POW writing all four components of a GPR, and the
// current MUL, DIV, DSQ, MAD or DOT reads that GPR unswizzled as its first
// operand, it issues at once and the mfu takes the operand's log value from
// the previous result before its antilog conversion.
// Control instructions: LDM moves the next matrix-FIFO word into constant
// memory, STC stores an operand into constant memory, WAITV waits for a
// vertex in the VIB, END waits for all results, offers the VOB to the
// rendering engine (vob_valid until vob_ready), releases the VIB and jumps.
// After reset the shader is idle; start begins execution at address 0. The
// host writes the instruction and constant memories through imem_*/cmem_*
// while the shader is idle.
//
// Memory sizes, the three swizzled operands, the mfu and log-domain
// forwarding follow the source design. The instruction set encoding
// (lgp_pkg::instr_t), the control instructions, the scoreboard and the
// handshakes are this design's own.
module vertex_shader
  import lgp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  // host access
  input  logic          imem_we,
  input  logic [6:0]    imem_waddr,
  input  logic [127:0]  imem_wdata,
  input  logic          cmem_we,
  input  logic [7:0]    cmem_waddr,
  input  logic [127:0]  cmem_wdata,
  // matrix FIFO
  input  logic          mf_valid,
  input  logic [127:0]  mf_data,
  output logic          mf_pop,
  // vertex input buffer, written by vertex fetch
  input  logic          vib_we,
  input  logic [4:0]    vib_waddr,
  input  logic [127:0]  vib_wdata,
  input  logic          vib_full,
  output logic          vib_release,
  // vertex output buffer, read by the rendering engine
  output logic          vob_valid,
  input  logic          vob_ready,
  input  logic [3:0]    vob_raddr,
  output logic [127:0]  vob_rdata,
  // status
  output logic          running,
  output logic [6:0]    pc_o,
  output vs_ev_t        ev
);
  localparam int unsigned TAG_W = 10;   // {vob, addr[4:0], wmask}

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_HAND} state_e;
  typedef struct packed {
    logic       v;
    logic       vob;
    logic [4:0] addr;
    logic [3:0] mask;
    vs_op_e     op;
  } sb_t;

  state_e st;
  logic [6:0] pc;
  logic mat_ph;
  sb_t  sb [5];

  // ------------------------------------------------------------ memories
  logic [0:0][127:0] imem_rd;
  instr_t ins;
  vs_mem #(.DEPTH(128), .WIDTH(128), .NRD(1)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wmask(4'hF), .wdata(imem_wdata),
    .raddr(pc), .rdata(imem_rd));
  assign ins = instr_t'(imem_rd[0]);

  logic [2:0][7:0]   ra;        // operand addresses
  logic [2:0][4:0]   ra_gpr;
  logic [2:0][4:0]   ra_vib;
  logic [2:0][127:0] rd_gpr, rd_cmem, rd_vib;
  src_t              srcs [3];
  vec_t              opnd [3], opsw [3];

  logic              wb_we_gpr, wb_we_vob;
  logic [TAG_W-1:0]  out_tag;
  vec_t              out_res;
  logic              out_valid;

  logic              c_we;
  logic [7:0]        c_waddr;
  logic [3:0]        c_wmask;
  logic [127:0]      c_wdata;

  always_comb
    for (int k = 0; k < 3; k++) begin
      ra_gpr[k] = ra[k][4:0];
      ra_vib[k] = ra[k][4:0];
    end

  vs_mem #(.DEPTH(32), .WIDTH(128), .NRD(3)) u_gpr (
    .clk(clk), .we(wb_we_gpr), .waddr(out_tag[8:4]), .wmask(out_tag[3:0]), .wdata(out_res),
    .raddr(ra_gpr), .rdata(rd_gpr));
  vs_mem #(.DEPTH(256), .WIDTH(128), .NRD(3)) u_cmem (
    .clk(clk), .we(c_we), .waddr(c_waddr), .wmask(c_wmask), .wdata(c_wdata),
    .raddr(ra), .rdata(rd_cmem));
  vs_mem #(.DEPTH(32), .WIDTH(128), .NRD(3)) u_vib (
    .clk(clk), .we(vib_we), .waddr(vib_waddr), .wmask(4'hF), .wdata(vib_wdata),
    .raddr(ra_vib), .rdata(rd_vib));
  logic [0:0][127:0] vob_rd;
  vs_mem #(.DEPTH(16), .WIDTH(128), .NRD(1)) u_vob (
    .clk(clk), .we(wb_we_vob), .waddr(out_tag[7:4]), .wmask(out_tag[3:0]), .wdata(out_res),
    .raddr(vob_raddr), .rdata(vob_rd));
  assign vob_rdata = vob_rd[0];

  // ------------------------------------------------------------ operands
  always_comb begin
    srcs[0] = ins.src0;
    srcs[1] = ins.src1;
    srcs[2] = ins.src2;
    ra[0] = ins.src0.addr;
    ra[1] = ins.src1.addr;
    ra[2] = ins.src2.addr;
    if (ins.op == V_MAT) begin
      // columns 2p and 2p+1 of the LNS matrix starting at src1
      srcs[2] = ins.src1;
      ra[1]   = ins.src1.addr + {6'd0, mat_ph, 1'b0};
      ra[2]   = ins.src1.addr + {6'd0, mat_ph, 1'b1};
    end
    for (int k = 0; k < 3; k++)
      case (srcs[k].bank)
        B_CMEM:  opnd[k] = rd_cmem[k];
        B_VIB:   opnd[k] = rd_vib[k];
        default: opnd[k] = rd_gpr[k];
      endcase
  end
  for (genvar k = 0; k < 3; k++) begin : g_swz
    swizzle u_swz (.v(opnd[k]), .sel(srcs[k].swz), .neg(srcs[k].neg), .o(opsw[k]));
  end

  // ------------------------------------------------------------ hazards
  function automatic logic busy_gpr(input src_bank_e b, input logic [7:0] a);
    logic h;
    h = 1'b0;
    for (int j = 0; j < 5; j++)
      if (b == B_GPR && sb[j].v && !sb[j].vob && sb[j].addr == a[4:0]) h = 1'b1;
    return h;
  endfunction

  logic is_mfu, two_ph, use0, use1, use2, hz0, hz12, fwd_ok, can_issue, issue;
  always_comb begin
    is_mfu = (ins.op != V_NOP) && (ins.op <= V_CRS);
    two_ph = ins.op inside {V_MAT, V_CRS};
    use0   = is_mfu || ins.op == V_STC;
    use1   = ins.op inside {V_ADD, V_MUL, V_DIV, V_DSQ, V_MAD, V_DOT, V_MAT, V_POW, V_ELM, V_CRS};
    use2   = ins.op inside {V_MAD, V_ELM, V_MAT};
    hz0    = use0 && busy_gpr(srcs[0].bank, ra[0]);
    hz12   = (use1 && busy_gpr(srcs[1].bank, ra[1])) || (use2 && busy_gpr(srcs[2].bank, ra[2]));
    if (ins.op == V_MAT && !mat_ph)
      hz12 = hz12 || busy_gpr(ins.src1.bank, ins.src1.addr + 8'd2)
                  || busy_gpr(ins.src1.bank, ins.src1.addr + 8'd3);
    fwd_ok = ins.op inside {V_MUL, V_DIV, V_DSQ, V_MAD, V_DOT}
          && sb[0].v && !sb[0].vob && sb[0].mask == 4'hF
          && sb[0].op inside {V_MUL, V_DIV, V_DSQ, V_POW}
          && ins.src0.bank == B_GPR && ins.src0.addr[4:0] == sb[0].addr
          && ins.src0.swz == SWZ_XYZW && !ins.src0.neg;
    case (ins.op)
      V_LDM:   can_issue = mf_valid;
      V_WAITV: can_issue = vib_full;
      V_END:   can_issue = 1'b1;
      default: can_issue = (mat_ph) || !(hz12 || (hz0 && !fwd_ok));
    endcase
    issue = (st == S_RUN) && can_issue;
  end

  // ------------------------------------------------------------ mfu
  logic [TAG_W-1:0] in_tag;
  assign in_tag = {ins.dst_vob, ins.dst[4:0], ins.wmask};
  mfu #(.TAG_W(TAG_W)) u_mfu (
    .clk(clk), .rst_n(rst_n),
    .in_valid(issue && is_mfu), .in_op(mfu_op_e'(ins.op[3:0])), .in_phase(mat_ph),
    .in_sub(ins.sub), .in_fwd(fwd_ok && hz0),
    .in_x(opsw[0]), .in_y(opsw[1]), .in_z(opsw[2]), .in_tag(in_tag),
    .out_valid(out_valid), .out_res(out_res), .out_tag(out_tag));
  assign wb_we_gpr = out_valid && !out_tag[9];
  assign wb_we_vob = out_valid &&  out_tag[9];

  // constant memory write: shader (LDM, STC) first, host otherwise
  always_comb begin
    c_we    = cmem_we;
    c_waddr = cmem_waddr;
    c_wmask = 4'hF;
    c_wdata = cmem_wdata;
    if (issue && ins.op == V_LDM) begin
      c_we = 1'b1; c_waddr = ins.dst; c_wdata = mf_data;
    end else if (issue && ins.op == V_STC) begin
      c_we = 1'b1; c_waddr = ins.dst; c_wmask = ins.wmask; c_wdata = opsw[0];
    end
  end
  assign mf_pop = issue && ins.op == V_LDM;

  // ------------------------------------------------------------ sequencing
  logic sb_empty;
  always_comb begin
    sb_empty = 1'b1;
    for (int j = 0; j < 5; j++) if (sb[j].v) sb_empty = 1'b0;
  end

  assign vob_valid   = (st == S_HAND);
  assign vib_release = (st == S_HAND) && vob_ready;
  assign running     = (st != S_IDLE);
  assign pc_o        = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      pc     <= '0;
      mat_ph <= 1'b0;
      for (int j = 0; j < 5; j++) sb[j] <= '0;
    end else begin
      sb[0] <= '{v: issue && is_mfu && !(two_ph && !mat_ph),
                 vob: ins.dst_vob, addr: ins.dst[4:0], mask: ins.wmask, op: ins.op};
      for (int j = 1; j < 5; j++) sb[j] <= sb[j-1];
      case (st)
        S_IDLE: if (start) begin st <= S_RUN; pc <= '0; end
        S_RUN: if (issue) begin
          if (two_ph && !mat_ph) mat_ph <= 1'b1;
          else begin
            mat_ph <= 1'b0;
            if (ins.op == V_END) st <= S_DRAIN;
            else                 pc <= pc + 1'b1;
          end
        end
        S_DRAIN: if (sb_empty) st <= S_HAND;
        default: if (vob_ready) begin st <= S_RUN; pc <= ins.target; end
      endcase
    end
  end

  always_comb begin
    ev          = '0;
    ev.fwd      = issue && is_mfu && fwd_ok && hz0;
    ev.hazard   = (st == S_RUN) && is_mfu && !can_issue;
    ev.mat      = issue && ins.op == V_MAT;
    ev.mf_wait  = (st == S_RUN) && ins.op == V_LDM && !mf_valid;
    ev.vtx_wait = (st == S_RUN) && ins.op == V_WAITV && !vib_full;
    ev.vob_wait = (st == S_HAND) && !vob_ready;
  end

  // results arrive exactly where the scoreboard expects them
  a_sb_wb: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid == sb[4].v);
endmodule
