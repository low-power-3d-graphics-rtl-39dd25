// tb_mfu: drives the multifunction unit with a random stream of every
// operation, one issue per cycle, and checks each result against real
// arithmetic and its arrival cycle: 5 cycles after issue, 6 after the first
// MAT or CRS phase. Log-domain forwarding is exercised by issuing a MUL/DIV/DSQ/MAD/DOT
// right after a MUL/DIV/DSQ/POW with in_fwd = 1 and a garbage x operand.
module tb_mfu;
  import lgp_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_phase, in_sub, in_fwd;
  mfu_op_e in_op;
  vec_t in_x, in_y, in_z, out_res;
  logic [7:0] in_tag, out_tag;
  logic out_valid;
  int checks = 0, failures = 0, cycle = 0;
  int n_op [16] = '{default: 0};
  int n_fwd = 0;

  mfu #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    real      exp [4];
    real      tol [4];
    int       due;
    mfu_op_e  op;
  } exp_t;
  exp_t pend [256];
  bit   busy [256];
  real  last [4];          // linear results of the previous operation
  mfu_op_e last_op = OP_NOP;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    chk(busy[out_tag], $sformatf("unexpected tag %0d", out_tag));
    if (busy[out_tag]) begin
      chk(pend[out_tag].due == cycle, $sformatf("tag %0d op %s latency: cycle %0d due %0d",
          out_tag, pend[out_tag].op.name(), cycle, pend[out_tag].due));
      for (int c = 0; c < 4; c++) begin
        real got;
        got = (pend[out_tag].op == OP_LNS) ? l2r(lns_t'(out_res[c])) : f2r(out_res[c]);
        chk(close(got, pend[out_tag].exp[c], 0.0, pend[out_tag].tol[c]),
            $sformatf("tag %0d op %s ch%0d: got %g exp %g", out_tag, pend[out_tag].op.name(), c, got, pend[out_tag].exp[c]));
      end
      busy[out_tag] = 0;
    end
  end

  function automatic real lg2(input real v);
    return $ln(v < 0 ? -v : v) / $ln(2.0);
  endfunction
  function automatic real ab(input real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic issue(input mfu_op_e op, input bit fwd, input int tag);
    real x [4], y [4], z [4], e [4], t [4];
    bit sub;
    sub = 1'($urandom_range(0, 1));
    for (int c = 0; c < 4; c++) begin
      x[c] = rnd(-8, 8); y[c] = rnd(-8, 8); z[c] = rnd(-8, 8);
    end
    if (fwd) for (int c = 0; c < 4; c++) x[c] = last[c];
    for (int c = 0; c < 4; c++) begin
      in_x[c] = r2f(x[c]); in_y[c] = r2f(y[c]); in_z[c] = r2f(z[c]);
      x[c] = f2r(in_x[c]); y[c] = f2r(in_y[c]); z[c] = f2r(in_z[c]);
      t[c] = 0.0;
    end
    if (fwd) for (int c = 0; c < 4; c++) begin x[c] = last[c]; in_x[c] = $urandom; end
    case (op)
      OP_ADD: for (int c = 0; c < 4; c++) begin e[c] = sub ? x[c] - y[c] : x[c] + y[c]; t[c] = 1e-6 * (ab(x[c]) + ab(y[c])); end
      OP_MUL: for (int c = 0; c < 4; c++) begin e[c] = x[c] * y[c]; t[c] = 2.5e-3 * ab(e[c]); end
      OP_DIV: for (int c = 0; c < 4; c++) begin e[c] = x[c] / y[c]; t[c] = 2.5e-3 * ab(e[c]); end
      OP_DSQ: for (int c = 0; c < 4; c++) begin
                y[c] = ab(y[c]); in_y[c][31] = 1'b0;
                e[c] = x[c] / $sqrt(y[c]); t[c] = 2.5e-3 * ab(e[c]);
              end
      OP_MAD: for (int c = 0; c < 4; c++) begin
                e[c] = sub ? x[c] * y[c] - z[c] : x[c] * y[c] + z[c];
                t[c] = 2.5e-3 * ab(x[c] * y[c]) + 1e-6 * ab(z[c]);
              end
      OP_DOT: begin
                real s, m;
                s = 0; m = 0;
                for (int c = 0; c < 4; c++) begin s += x[c] * y[c]; m += ab(x[c] * y[c]); end
                for (int c = 0; c < 4; c++) begin e[c] = s; t[c] = 2.5e-3 * m; end
              end
      OP_POW: for (int c = 0; c < 4; c++) begin
                x[c] = ab(x[c]); in_x[c][31] = 1'b0;
                y[c] = rnd(-3, 2); in_y[c] = r2f(y[c]); y[c] = f2r(in_y[c]);
                e[c] = $pow(x[c], y[c]);
                t[c] = (1.2e-3 + 6e-4 * ab(y[c] * 0.7)) * ab(e[c]);
              end
      OP_ELM: begin
                real s, m, lx;
                x[0] = ab(x[0]); in_x[0][31] = 1'b0;
                lx = lg2(x[0]);
                s = x[3]; m = 0;
                for (int c = 0; c < 4; c++) begin
                  real term;
                  y[c] = real'($urandom_range(1, 5)); in_y[c] = r2f(y[c]);     // k_i
                  in_z[c] = r2l(z[c]);                                         // C_i = log2 c_i
                  term = (z[c] < 0 ? -1.0 : 1.0) * $pow(2.0, l2r(lns_t'(in_z[c])) + y[c] * lx);
                  s += term; m += ab(term) * (1.2e-3 + 6e-4 * y[c]);
                end
                for (int c = 0; c < 4; c++) begin e[c] = s; t[c] = m + 1e-6 * ab(x[3]); end
              end
      OP_LOG: for (int c = 0; c < 4; c++) begin e[c] = lg2(x[c]); t[c] = 6e-4; end
      OP_LNS: for (int c = 0; c < 4; c++) begin e[c] = lg2(x[c]); t[c] = 6e-4; end
      default: ;
    endcase
    in_valid = 1; in_op = op; in_phase = 0; in_sub = sub; in_fwd = fwd; in_tag = 8'(tag);
    pend[tag].op = op; pend[tag].due = cycle + 5; busy[tag] = 1;
    for (int c = 0; c < 4; c++) begin pend[tag].exp[c] = e[c]; pend[tag].tol[c] = t[c] + 1e-30; last[c] = e[c]; end
    n_op[op]++;
    if (fwd) n_fwd++;
    last_op = op;
    @(posedge clk); #1;
  endtask

  // MAT: two issue cycles; y/z carry the LNS columns 2p and 2p+1
  task automatic issue_mat(input int tag);
    real x [4], c [4][4], e [4], m [4];
    for (int j = 0; j < 4; j++) begin
      x[j] = rnd(-6, 6); in_x[j] = r2f(x[j]); x[j] = f2r(in_x[j]);
      for (int i = 0; i < 4; i++) c[i][j] = rnd(-6, 6);
    end
    for (int i = 0; i < 4; i++) begin
      e[i] = 0; m[i] = 0;
      for (int j = 0; j < 4; j++) begin
        real cc;
        cc = (c[i][j] < 0 ? -1.0 : 1.0) * $pow(2.0, l2r(r2l(c[i][j])));
        e[i] += cc * x[j]; m[i] += ab(cc * x[j]);
      end
    end
    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < 4; i++) begin in_y[i] = r2l(c[i][2*p]); in_z[i] = r2l(c[i][2*p+1]); end
      in_valid = 1; in_op = OP_MAT; in_phase = 1'(p); in_sub = 0; in_fwd = 0; in_tag = 8'(tag);
      @(posedge clk); #1;
    end
    pend[tag].op = OP_MAT; pend[tag].due = cycle + 4; busy[tag] = 1;
    for (int i = 0; i < 4; i++) begin pend[tag].exp[i] = e[i]; pend[tag].tol[i] = 1.5e-3 * m[i] + 1e-30; end
    n_op[OP_MAT]++;
    last_op = OP_MAT;
  endtask

  // CRS: two issue cycles with the same x and y; channel 3 must be exactly 0
  task automatic issue_crs(input int tag);
    real x [4], y [4];
    for (int c = 0; c < 4; c++) begin
      x[c] = rnd(-8, 8); in_x[c] = r2f(x[c]); x[c] = f2r(in_x[c]);
      y[c] = rnd(-8, 8); in_y[c] = r2f(y[c]); y[c] = f2r(in_y[c]);
      in_z[c] = $urandom;
    end
    for (int p = 0; p < 2; p++) begin
      in_valid = 1; in_op = OP_CRS; in_phase = 1'(p); in_sub = 0; in_fwd = 0; in_tag = 8'(tag);
      @(posedge clk); #1;
    end
    pend[tag].op = OP_CRS; pend[tag].due = cycle + 4; busy[tag] = 1;
    for (int c = 0; c < 3; c++) begin
      real a, b;
      a = x[(c + 1) % 3] * y[(c + 2) % 3];
      b = x[(c + 2) % 3] * y[(c + 1) % 3];
      pend[tag].exp[c] = a - b; pend[tag].tol[c] = 2.5e-3 * (ab(a) + ab(b)) + 1e-30;
    end
    pend[tag].exp[3] = 0.0; pend[tag].tol[3] = 1e-30;
    n_op[OP_CRS]++;
    last_op = OP_CRS;
  endtask

  initial begin
    mfu_op_e ops [12];
    int tag;
    ops = '{OP_ADD, OP_MUL, OP_DIV, OP_DSQ, OP_MAD, OP_DOT, OP_MAT, OP_POW, OP_ELM, OP_LOG, OP_LNS, OP_CRS};
    in_valid = 0; in_op = OP_NOP; in_phase = 0; in_sub = 0; in_fwd = 0; in_x = '0; in_y = '0; in_z = '0; in_tag = '0;
    for (int i = 0; i < 256; i++) busy[i] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    tag = 0;
    for (int i = 0; i < 3000; i++) begin
      mfu_op_e op;
      bit fwd;
      op = ops[$urandom_range(0, 11)];
      fwd = (last_op inside {OP_MUL, OP_DIV, OP_DSQ}) && (op inside {OP_MUL, OP_DIV, OP_DSQ, OP_MAD, OP_DOT})
            && ($urandom_range(0, 1) == 1);
      while (busy[tag]) tag = (tag + 1) % 256;
      if (op == OP_MAT)      issue_mat(tag);
      else if (op == OP_CRS) issue_crs(tag);
      else                   issue(op, fwd, tag);
      tag = (tag + 1) % 256;
      if ($urandom_range(0, 7) == 0) begin in_valid = 0; last_op = OP_NOP; @(posedge clk); #1; end
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 256; i++) chk(!busy[i], $sformatf("tag %0d never returned", i));
    foreach (ops[k]) chk(n_op[ops[k]] > 0, $sformatf("op %s never issued", ops[k].name()));
    chk(n_fwd > 0, "forwarding never exercised");
    $display("forwarded operations: %0d", n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
