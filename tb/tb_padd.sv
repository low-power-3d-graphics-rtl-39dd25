// tb_padd: checks the programmable adder in per-channel mode (add and
// subtract) and in reduction-tree mode (four-term sum plus the extra term).
module tb_padd;
  import lgp_pkg::*;
  import tb_pkg::*;
  vec_t a, b, r;
  logic [3:0] sub;
  logic tree;
  flp_t e;
  int checks = 0, failures = 0;
  padd dut (.a(a), .b(b), .sub(sub), .tree(tree), .e(e), .r(r));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ra [4], rb [4], re, exp;
    for (int i = 0; i < 2000; i++) begin
      for (int c = 0; c < 4; c++) begin
        a[c] = r2f(rnd(-10, 10)); b[c] = r2f(rnd(-10, 10));
        ra[c] = f2r(a[c]); rb[c] = f2r(b[c]);
      end
      e = r2f(rnd(-10, 10)); re = f2r(e);
      sub = 4'($urandom_range(0, 15));
      tree = (i % 2 == 1);
      #1;
      if (!tree) begin
        for (int c = 0; c < 4; c++) begin
          exp = sub[c] ? ra[c] - rb[c] : ra[c] + rb[c];
          chk(close(f2r(r[c]), exp, 0.0, 2048.0 * $pow(2.0, -21.0)), $sformatf("sep ch%0d", c));
        end
      end else begin
        exp = ra[0] + ra[1] + ra[2] + ra[3] + re;
        for (int c = 0; c < 4; c++)
          chk(close(f2r(r[c]), exp, 0.0, 4096.0 * $pow(2.0, -20.0)), $sformatf("tree ch%0d %g vs %g", c, f2r(r[c]), exp));
      end
    end
    a = {r2f(4.0), r2f(3.0), r2f(2.0), r2f(1.0)}; e = r2f(0.5); tree = 1; #1;
    chk(r[0] == r2f(10.5) && r[3] == r2f(10.5), "tree exact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
