// tb_lns_gpu_top: end-to-end run of the geometry stage at its default sizes.
// The test plays the application processor (program and constant upload,
// matrix columns through the matrix FIFO, a stream of vertex indices), the
// external memory holding the vertex array, and the rendering engine (takes
// each shaded vertex from the VOB and the indices from the index FIFO, with
// a slow phase that lets the index FIFO fill up). Every VOB result is checked
// against real arithmetic, and every mechanism must occur at least once:
// log-domain forwarding, dependency stalls, MAT, waiting on the matrix FIFO,
// on a vertex and on the rendering engine, index-FIFO back-pressure, and
// frequency changes of both selectors (the geometry one in both directions).
module tb_lns_gpu_top;
  import lgp_pkg::*;
  import tb_pkg::*;

  localparam int NV = 48;       // vertices drawn
  localparam int NATTR = 4;

  logic clk = 0, rst_n = 0;
  logic start, imem_we, cmem_we, mat_valid, mat_ready, idx_valid, idx_ready;
  logic [6:0] imem_waddr;
  logic [7:0] cmem_waddr;
  logic [127:0] imem_wdata, cmem_wdata, mat_data, mem_rdata, vob_rdata;
  logic [31:0] idx, ififo_data;
  logic [19:0] cfg_vbase, mem_addr;
  logic [5:0] cfg_nattr;
  logic [8:0] ref_mfifo;
  logic [4:0] ref_ififo;
  logic mem_req, mem_rvalid, ififo_valid, ififo_ready, vob_valid, vob_ready;
  logic [3:0] vob_raddr;
  logic [7:0] n_app, n_vs;
  logic n_app_chg, n_vs_chg, running;
  logic [6:0] pc;
  vs_ev_t ev;

  lns_gpu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_fwd = 0, n_haz = 0, n_mat = 0, n_mfw = 0, n_vtw = 0, n_vobw = 0, n_bp = 0;
  int n_app_up = 0, n_vs_up = 0, n_vs_down = 0, max_level = 0;
  int prev_vs = 89;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (ev.fwd) n_fwd++;
      if (ev.hazard) n_haz++;
      if (ev.mat) n_mat++;
      if (ev.mf_wait) n_mfw++;
      if (ev.vtx_wait) n_vtw++;
      if (ev.vob_wait) n_vobw++;
      if (idx_valid && !idx_ready && !dut.u_index_fifo.push_ready) n_bp++;
      if (n_app_chg && n_app > 8'd89) n_app_up++;
      if (n_vs_chg) begin
        if (int'(n_vs) > prev_vs) n_vs_up++; else n_vs_down++;
        prev_vs = int'(n_vs);
      end
      if (int'(dut.u_index_fifo.level) > max_level) max_level = int'(dut.u_index_fifo.level);
    end
  end

  // ------------------------------------------------------------ external memory
  rvec_t verts [64][4];
  always @(posedge clk) if (mem_req) begin
    automatic logic [19:0] a = mem_addr;
    fork begin
      repeat (2) @(posedge clk);
      #1 mem_rvalid = 1; mem_rdata = pack4(verts[(int'(a) - 256) / NATTR][(int'(a) - 256) % NATTR]);
      @(posedge clk); #1 mem_rvalid = 0;
    end join_none
  end

  // ------------------------------------------------------------ rendering engine
  int order [$];            // indices in issue order
  int n_done = 0;
  consts_t c;
  initial begin
    rvec_t r [8], t [8], got;
    vob_ready = 0; vob_raddr = 0;
    forever begin
      @(posedge clk); #1;
      if (vob_valid && order.size() > 0) begin
        int v;
        v = order.pop_front();
        repeat ($urandom_range(0, 4)) @(posedge clk);
        #1;
        ref_vertex(c, verts[v], r, t);
        for (int e = 0; e < 8; e++) begin
          vob_raddr = 4'(e); #1;
          unpack4(vob_rdata, got);
          for (int i = 0; i < 4; i++)
            chk(close(got[i], r[e][i], 0.0, t[e][i]),
                $sformatf("vertex %0d vob%0d.%0d: got %g exp %g", v, e, i, got[i], r[e][i]));
        end
        @(negedge clk); vob_ready = 1; @(posedge clk); #1 vob_ready = 0;
        n_done++;
      end
    end
  end
  // index FIFO consumer: slow for the first half, fast afterwards
  int popped [$];
  initial begin
    ififo_ready = 0;
    forever begin
      @(posedge clk); #1;
      ififo_ready = (n_done > NV / 2) ? 1'b1 : ($urandom_range(0, 199) == 0);
      #1;
      if (ififo_valid && ififo_ready) popped.push_back(int'(ififo_data));
    end
  end

  // ------------------------------------------------------------ application processor
  instr_t prog [$];
  int issued [$];
  initial begin
    start = 0; imem_we = 0; cmem_we = 0; mat_valid = 0; idx_valid = 0;
    imem_waddr = 0; cmem_waddr = 0; imem_wdata = 0; cmem_wdata = 0; mat_data = 0; idx = 0;
    cfg_vbase = 20'd256; cfg_nattr = 6'(NATTR); ref_mfifo = 9'd2; ref_ififo = 5'd4;
    mem_rvalid = 0; mem_rdata = 0;
    for (int v = 0; v < 64; v++) make_vertex(verts[v]);
    make_consts(c);
    repeat (3) @(posedge clk); #1 rst_n = 1;
    shader_prog(prog);
    foreach (prog[i]) begin imem_we = 1; imem_waddr = 7'(i); imem_wdata = prog[i]; @(posedge clk); #1; end
    imem_we = 0;
    cmem_we = 1;
    cmem_waddr = 8;  cmem_wdata = pack4(c.l);  @(posedge clk); #1;
    cmem_waddr = 9;  cmem_wdata = pack4(c.k);  @(posedge clk); #1;
    cmem_waddr = 10; cmem_wdata = pack4(c.b);  @(posedge clk); #1;
    cmem_waddr = 11; cmem_wdata = pack4(c.e);  @(posedge clk); #1;
    cmem_waddr = 12; cmem_wdata = pack4(c.kk); @(posedge clk); #1;
    cmem_waddr = 13; cmem_wdata = pack4l(c.cc); @(posedge clk); #1;
    cmem_we = 0;
    start = 1; @(posedge clk); #1 start = 0;
    // the matrix arrives late: the shader waits on the matrix FIFO
    repeat (200) @(posedge clk); #1;
    for (int j = 0; j < 4; j++) begin
      mat_valid = 1; mat_data = pack4(c.m[j]); #1;
      while (!mat_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1 mat_valid = 0;
      repeat (5) @(posedge clk); #1;
    end
    for (int n = 0; n < NV; n++) begin
      idx = $urandom_range(0, 63);
      idx_valid = 1; #1;
      while (!idx_ready) begin @(posedge clk); #1; end
      order.push_back(int'(idx));
      issued.push_back(int'(idx));
      @(posedge clk); #1 idx_valid = 0;
    end
    while (n_done < NV) begin @(posedge clk); #1; end
    repeat (400) @(posedge clk); #1;
    chk(popped.size() == NV, $sformatf("indices delivered %0d", popped.size()));
    foreach (popped[i]) chk(popped[i] == issued[i], "index order");
    chk(n_fwd == 2 * NV, $sformatf("forwards %0d", n_fwd));
    chk(n_mat == 2 * NV, $sformatf("MAT phases %0d", n_mat));
    chk(n_haz > 0, "dependency stall never happened");
    chk(n_mfw > 0, "matrix-FIFO wait never happened");
    chk(n_vtw > 0, "vertex wait never happened");
    chk(n_vobw > 0, "VOB wait never happened");
    chk(n_bp > 0, "index-FIFO back-pressure never happened");
    chk(n_app_up > 0, "application frequency never raised");
    chk(n_vs_up > 0 && n_vs_down > 0, "geometry frequency not moved both ways");
    $display("events: fwd %0d hazard %0d mat %0d mf_wait %0d vtx_wait %0d vob_wait %0d backpressure %0d",
             n_fwd, n_haz, n_mat, n_mfw, n_vtw, n_vobw, n_bp);
    $display("frequency: app raised %0d, vs up %0d down %0d, final n_app %0d n_vs %0d, max index level %0d, cycles %0d",
             n_app_up, n_vs_up, n_vs_down, n_app, n_vs, max_level, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
