// lns_gpu_top: geometry stage of the low-power 3D graphics processor.
//
// The application processor (RISC) sends transformation matrices through the
// matrix FIFO and programs the vertex shader; the vertex fetch unit loads
// each vertex from external memory into the vertex input buffer and queues
// its index for the rendering engine; the vertex shader transforms and lights
// the vertex with its logarithmic multifunction unit and leaves the result in
// the vertex output buffer, where the rendering engine reads it.
//
// Power management: each FIFO's occupancy is watched by a frequency selector.
// The matrix-FIFO selector sets the divider ratio n_app of the application
// domain's PLL, the index-FIFO selector the ratio n_vs of the geometry
// domain's PLL (target frequency in MHz for the 1 MHz PLL reference). The
// PLLs with their regulators, the RISC, the rendering engine and the external
// SRAM are outside this module; their connections are ports.
//
// Clocking: everything here runs on clk. In the source design the three
// domains have separately scaled clocks and supplies; how data crosses
// between them is not described, and this module does not model it.
module lns_gpu_top
  import lgp_pkg::*;
#(
  parameter int unsigned AW = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  // application processor side
  input  logic         start,
  input  logic         imem_we,
  input  logic [6:0]   imem_waddr,
  input  logic [127:0] imem_wdata,
  input  logic         cmem_we,
  input  logic [7:0]   cmem_waddr,
  input  logic [127:0] cmem_wdata,
  input  logic         mat_valid,
  output logic         mat_ready,
  input  logic [127:0] mat_data,
  input  logic         idx_valid,
  output logic         idx_ready,
  input  logic [31:0]  idx,
  input  logic [AW-1:0] cfg_vbase,
  input  logic [5:0]   cfg_nattr,
  input  logic [8:0]   ref_mfifo,     // reference points of the selectors
  input  logic [4:0]   ref_ififo,
  // external memory
  output logic         mem_req,
  output logic [AW-1:0] mem_addr,
  input  logic         mem_rvalid,
  input  logic [127:0] mem_rdata,
  // rendering engine side
  output logic         ififo_valid,
  input  logic         ififo_ready,
  output logic [31:0]  ififo_data,
  output logic         vob_valid,
  input  logic         vob_ready,
  input  logic [3:0]   vob_raddr,
  output logic [127:0] vob_rdata,
  // PLL divider ratios
  output logic [7:0]   n_app,
  output logic [7:0]   n_vs,
  output logic         n_app_chg,     // one-cycle pulse: new ratio, relock
  output logic         n_vs_chg,
  // status
  output logic         running,
  output logic [6:0]   pc,
  output vs_ev_t       ev
);
  logic         mf_valid, mf_pop;
  logic [127:0] mf_data;
  logic [8:0]   mf_level;
  logic [4:0]   if_level;
  logic         vib_we, vib_full, vib_release;
  logic [4:0]   vib_waddr;
  logic [127:0] vib_wdata;
  logic         if_push, if_ready;
  logic [31:0]  if_data;

  sync_fifo #(.DEPTH(256), .WIDTH(128)) u_matrix_fifo (
    .clk(clk), .rst_n(rst_n),
    .push_valid(mat_valid), .push_ready(mat_ready), .push_data(mat_data),
    .pop_valid(mf_valid), .pop_ready(mf_pop), .pop_data(mf_data), .level(mf_level));

  freq_sel #(.LVL_W(9)) u_fs_app (
    .clk(clk), .rst_n(rst_n), .level(mf_level), .ref_level(ref_mfifo), .n(n_app), .changed(n_app_chg));

  vertex_fetch #(.AW(AW), .VIB_D(32)) u_vertex_fetch (
    .clk(clk), .rst_n(rst_n),
    .idx_valid(idx_valid), .idx_ready(idx_ready), .idx(idx),
    .cfg_vbase(cfg_vbase), .cfg_nattr(cfg_nattr),
    .mem_req(mem_req), .mem_addr(mem_addr), .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata),
    .vib_we(vib_we), .vib_waddr(vib_waddr), .vib_wdata(vib_wdata),
    .vib_full(vib_full), .vib_release(vib_release),
    .ififo_push(if_push), .ififo_ready(if_ready), .ififo_data(if_data));

  vertex_shader u_vs (
    .clk(clk), .rst_n(rst_n), .start(start),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .cmem_we(cmem_we), .cmem_waddr(cmem_waddr), .cmem_wdata(cmem_wdata),
    .mf_valid(mf_valid), .mf_data(mf_data), .mf_pop(mf_pop),
    .vib_we(vib_we), .vib_waddr(vib_waddr), .vib_wdata(vib_wdata),
    .vib_full(vib_full), .vib_release(vib_release),
    .vob_valid(vob_valid), .vob_ready(vob_ready), .vob_raddr(vob_raddr), .vob_rdata(vob_rdata),
    .running(running), .pc_o(pc), .ev(ev));

  sync_fifo #(.DEPTH(16), .WIDTH(32)) u_index_fifo (
    .clk(clk), .rst_n(rst_n),
    .push_valid(if_push), .push_ready(if_ready), .push_data(if_data),
    .pop_valid(ififo_valid), .pop_ready(ififo_ready), .pop_data(ififo_data), .level(if_level));

  freq_sel #(.LVL_W(5)) u_fs_vs (
    .clk(clk), .rst_n(rst_n), .level(if_level), .ref_level(ref_ififo), .n(n_vs), .changed(n_vs_chg));
endmodule
