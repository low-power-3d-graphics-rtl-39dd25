// tb_vertex_shader: runs the transform-and-lighting test program on the
// vertex shader for a number of random vertices and checks every VOB result
// against real arithmetic. A second program checks issue timing: back-to-back
// MULs with log-domain forwarding issue in consecutive cycles, a dependent
// ADD waits until the producer's result is written (6 cycles), two MATs
// issue 2 cycles apart and a MAT result appears 6 cycles after its first
// phase, and a CRS takes two issue cycles. The test acts as host, matrix
// FIFO, vertex fetch and rendering engine.
module tb_vertex_shader;
  import lgp_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic imem_we = 0, cmem_we = 0, mf_valid = 0, mf_pop, vib_we = 0, vib_full = 0, vib_release;
  logic vob_valid, vob_ready = 0, running;
  logic [6:0] imem_waddr = 0, pc_o;
  logic [7:0] cmem_waddr = 0;
  logic [4:0] vib_waddr = 0;
  logic [3:0] vob_raddr = 0;
  logic [127:0] imem_wdata = 0, cmem_wdata = 0, mf_data = 0, vib_wdata = 0, vob_rdata;
  vs_ev_t ev;
  int checks = 0, failures = 0, cycle = 0;
  int n_fwd = 0, n_haz = 0, n_mat = 0, n_mfw = 0, n_vtw = 0, n_vobw = 0;

  vertex_shader dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (ev.fwd) n_fwd++;
    if (ev.hazard) n_haz++;
    if (ev.mat) n_mat++;
    if (ev.mf_wait) n_mfw++;
    if (ev.vtx_wait) n_vtw++;
    if (ev.vob_wait) n_vobw++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load_prog(input instr_t p [$]);
    foreach (p[i]) begin
      imem_we = 1; imem_waddr = 7'(i); imem_wdata = p[i];
      @(posedge clk); #1;
    end
    imem_we = 0;
  endtask

  task automatic wcmem(input int a, input logic [127:0] d);
    cmem_we = 1; cmem_waddr = 8'(a); cmem_wdata = d;
    @(posedge clk); #1;
    cmem_we = 0;
  endtask

  // issue-cycle monitor for the timing program
  int issue_cyc [128];
  int mat_out_cyc;
  always @(posedge clk) if (dut.issue) begin
    if (!(dut.ins.op inside {V_MAT, V_CRS} && dut.mat_ph)) issue_cyc[dut.pc] = cycle;
  end
  always @(posedge clk) if (dut.u_mfu.out_valid && dut.u_mfu.out_tag[9]) mat_out_cyc = cycle;

  instr_t prog [$];
  consts_t c;
  rvec_t a [4];
  rvec_t r [8], t [8], got;

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // ---------------------------------------------------- functional program
    shader_prog(prog);
    load_prog(prog);
    make_consts(c);
    wcmem(8, pack4(c.l)); wcmem(9, pack4(c.k)); wcmem(10, pack4(c.b));
    wcmem(11, pack4(c.e)); wcmem(12, pack4(c.kk)); wcmem(13, pack4l(c.cc));
    start = 1; @(posedge clk); #1 start = 0;
    // matrix FIFO: columns arrive with gaps
    for (int j = 0; j < 4; j++) begin
      repeat (3) @(posedge clk); #1;
      mf_valid = 1; mf_data = pack4(c.m[j]);
      do @(posedge clk); while (!mf_pop);
      #1 mf_valid = 0;
    end
    for (int v = 0; v < 40; v++) begin
      make_vertex(a);
      repeat ($urandom_range(0, 6)) @(posedge clk);
      #1;
      for (int i = 0; i < 4; i++) begin
        vib_we = 1; vib_waddr = 5'(i); vib_wdata = pack4(a[i]); @(posedge clk); #1;
      end
      vib_we = 0; vib_full = 1;
      while (!vob_valid) begin @(posedge clk); #1; end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      ref_vertex(c, a, r, t);
      for (int e = 0; e < 8; e++) begin
        vob_raddr = 4'(e); #1;
        unpack4(vob_rdata, got);
        for (int i = 0; i < 4; i++)
          chk(close(got[i], r[e][i], 0.0, t[e][i]),
              $sformatf("vertex %0d vob%0d.%0d: got %g exp %g", v, e, i, got[i], r[e][i]));
      end
      @(negedge clk); vob_ready = 1; @(posedge clk); #1 vob_ready = 0; vib_full = 0;
    end
    chk(n_fwd == 80, $sformatf("forwards %0d, expected 2 per vertex", n_fwd));
    chk(n_mat == 80, $sformatf("MAT phases %0d", n_mat));
    chk(n_haz > 0 && n_mfw > 0 && n_vtw > 0 && n_vobw > 0,
        $sformatf("events haz %0d mfw %0d vtw %0d vobw %0d", n_haz, n_mfw, n_vtw, n_vobw));

    // ---------------------------------------------------- timing program
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    prog.delete();
    prog.push_back(I(V_MUL, 1, 0, S(B_VIB, 0), S(B_CMEM, 9)));             // 0
    prog.push_back(I(V_MUL, 2, 0, S(B_GPR, 1), S(B_CMEM, 9)));             // 1 fwd
    prog.push_back(I(V_MUL, 3, 0, S(B_GPR, 2), S(B_CMEM, 9)));             // 2 fwd
    prog.push_back(I(V_ADD, 4, 0, S(B_GPR, 3), S(B_CMEM, 9)));             // 3 waits
    prog.push_back(I(V_MAT, 0, 1, S(B_VIB, 0), S(B_CMEM, 4)));             // 4
    prog.push_back(I(V_MAT, 1, 1, S(B_VIB, 1), S(B_CMEM, 4)));             // 5
    prog.push_back(I(V_STC, 20, 0, S(B_GPR, 4)));                          // 6 waits
    prog.push_back(I(V_CRS, 8, 0, S(B_VIB, 0), S(B_CMEM, 9)));             // 7
    prog.push_back(I(V_END, 0, 0, '0, '0, '0, 0, 4'hF, 8));                // 8
    load_prog(prog);
    start = 1; @(posedge clk); #1 start = 0;
    while (!vob_valid) begin @(posedge clk); #1; end
    chk(issue_cyc[1] == issue_cyc[0] + 1, "forwarded MUL issues next cycle");
    chk(issue_cyc[2] == issue_cyc[1] + 1, "second forwarded MUL issues next cycle");
    chk(issue_cyc[3] == issue_cyc[2] + 6, $sformatf("dependent ADD waits 6 cycles (%0d)", issue_cyc[3] - issue_cyc[2]));
    chk(issue_cyc[5] == issue_cyc[4] + 2, "MAT every 2 cycles");
    chk(mat_out_cyc == issue_cyc[5] + 6, $sformatf("MAT latency %0d", mat_out_cyc - issue_cyc[5]));
    chk(issue_cyc[6] == issue_cyc[3] + 6, "STC waits for ADD");
    chk(issue_cyc[8] == issue_cyc[7] + 2, "CRS takes two issue cycles");
    // GPR 8 = cross product of VIB 0 and constant 9, w = 0
    unpack4(dut.u_gpr.mem[8], got);
    for (int i = 0; i < 4; i++) begin
      real p, q;
      p = (i == 3) ? 0.0 : a[0][(i + 1) % 3] * c.k[(i + 2) % 3];
      q = (i == 3) ? 0.0 : a[0][(i + 2) % 3] * c.k[(i + 1) % 3];
      chk(close(got[i], p - q, 0.0, 3e-3 * (ab(p) + ab(q)) + 1e-30),
          $sformatf("cross product %0d: %g vs %g", i, got[i], p - q));
    end
    // r4 = ((v*k)*k)*k + k, written to constant 20 by STC
    begin
      rvec_t v0;
      unpack4(dut.u_cmem.mem[20], got);
      for (int i = 0; i < 4; i++) begin
        real e;
        v0[i] = a[0][i];
        e = v0[i] * c.k[i] * c.k[i] * c.k[i] + c.k[i];
        chk(close(got[i], e, 0.0, 6e-3 * ab(v0[i] * c.k[i] * c.k[i] * c.k[i]) + 1e-5 * ab(c.k[i])),
            $sformatf("forward chain %0d: %g vs %g", i, got[i], e));
      end
    end
    vob_ready = 1; @(posedge clk); #1 vob_ready = 0;
    $display("events: fwd %0d hazard %0d mat %0d mf_wait %0d vtx_wait %0d vob_wait %0d",
             n_fwd, n_haz, n_mat, n_mfw, n_vtw, n_vobw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
