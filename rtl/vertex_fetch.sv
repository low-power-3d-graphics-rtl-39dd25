// vertex_fetch: loads the attributes of one vertex from external memory into
// the vertex input buffer (VIB) and forwards the vertex index to the index
// FIFO of the rendering engine.
//
// For each index accepted on idx_*, while the VIB is free and the index FIFO
// has room, it reads cfg_nattr consecutive 128-bit words starting at
// cfg_vbase + idx * cfg_nattr, one request at a time (mem_req/mem_addr, the
// answer on mem_rvalid/mem_rdata some cycles later), writes word a to VIB
// entry a, then pushes the index into the index FIFO and sets vib_full. The
// vertex shader clears vib_full with vib_release when it has consumed the
// vertex.
//
// The source design names this unit and shows its connections to the VIB and
// the index FIFO; the memory protocol, address computation and one-vertex
// buffering are this design's own.
module vertex_fetch #(
  parameter int unsigned AW    = 20,   // external word address width
  parameter int unsigned VIB_D = 32    // VIB entries
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     idx_valid,
  output logic                     idx_ready,
  input  logic [31:0]              idx,
  input  logic [AW-1:0]            cfg_vbase,
  input  logic [$clog2(VIB_D):0]   cfg_nattr,   // 1..VIB_D
  output logic                     mem_req,
  output logic [AW-1:0]            mem_addr,
  input  logic                     mem_rvalid,
  input  logic [127:0]             mem_rdata,
  output logic                     vib_we,
  output logic [$clog2(VIB_D)-1:0] vib_waddr,
  output logic [127:0]             vib_wdata,
  output logic                     vib_full,
  input  logic                     vib_release,
  output logic                     ififo_push,
  input  logic                     ififo_ready,
  output logic [31:0]              ififo_data
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_PUSH} state_e;
  state_e st;
  logic [31:0] cur;
  logic [$clog2(VIB_D):0] a;

  assign idx_ready  = (st == S_IDLE) && !vib_full && ififo_ready;
  assign mem_req    = (st == S_REQ);
  assign mem_addr   = cfg_vbase + AW'(cur * 32'(cfg_nattr)) + AW'(a);
  assign vib_we     = (st == S_WAIT) && mem_rvalid;
  assign vib_waddr  = a[$clog2(VIB_D)-1:0];
  assign vib_wdata  = mem_rdata;
  assign ififo_push = (st == S_PUSH);
  assign ififo_data = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      cur      <= '0;
      a        <= '0;
      vib_full <= 1'b0;
    end else begin
      if (vib_release) vib_full <= 1'b0;
      case (st)
        S_IDLE: if (idx_valid && idx_ready) begin
          cur <= idx;
          a   <= '0;
          st  <= S_REQ;
        end
        S_REQ:  st <= S_WAIT;
        S_WAIT: if (mem_rvalid) begin
          a  <= a + 1'b1;
          st <= (a + 1'b1 == cfg_nattr) ? S_PUSH : S_REQ;
        end
        default: begin   // S_PUSH: ififo_ready was checked on accept
          vib_full <= 1'b1;
          st       <= S_IDLE;
        end
      endcase
    end
  end
endmodule
