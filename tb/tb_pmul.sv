// tb_pmul: checks the three uses of the programmable multiplier against real
// arithmetic: log conversion of y (with and without the square-root shift),
// antilog conversion of l, and the Booth product y * l with exponent shift.
module tb_pmul;
  import lgp_pkg::*;
  import tb_pkg::*;
  logic [1:0] mode;
  flp_t y, fo;
  lns_t l, lo;
  logic q;
  int checks = 0, failures = 0;
  pmul dut (.mode(mode), .y(y), .l(l), .q(q), .lo(lo), .fo(fo));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ry, rl, exp;
    l = '0; q = 0;
    // LOG mode
    mode = 2'd0;
    for (int i = 0; i < 1000; i++) begin
      ry = rnd(-40, 40); y = r2f(ry); q = 1'($urandom_range(0, 1)); #1;
      exp = $ln(ry < 0 ? -ry : ry) / $ln(2.0) / (q ? 2.0 : 1.0);
      chk(close(l2r(lo), exp, 0.0, 6e-4) && lo.s == (ry < 0), $sformatf("log %g q%0d: %f vs %f", ry, q, l2r(lo), exp));
    end
    // ALOG mode
    mode = 2'd1; q = 0;
    for (int i = 0; i < 1000; i++) begin
      l = '{s: 1'($urandom_range(0, 1)), z: 1'b0, l: 30'($signed($urandom_range(0, 32'h07FF_FFFF)) - 32'sh0400_0000)};
      #1;
      exp = $pow(2.0, l2r(l)) * (l.s ? -1.0 : 1.0);
      chk(close(f2r(fo), exp, 9e-4, 0.0), $sformatf("alog %f: %g vs %g", l2r(l), f2r(fo), exp));
    end
    // MUL mode (Booth), y * l
    mode = 2'd2;
    for (int i = 0; i < 2000; i++) begin
      ry = rnd(-6, 5);
      y = r2f(ry); ry = f2r(y);
      l = '{s: 1'b0, z: 1'b0, l: 30'($signed($urandom_range(0, 32'h0FFF_FFFF)) - 32'sh0800_0000) >>> 2};
      #1;
      exp = ry * l2r(l);
      if (exp > 255.9) exp = 255.9999995; if (exp < -256.0) exp = -256.0;
      chk(close(l2r(lo), exp, 0.0, 3e-6), $sformatf("mul %g * %f: %f vs %f", ry, l2r(l), l2r(lo), exp));
    end
    y = r2f(3.0); l = '{s: 1'b0, z: 1'b0, l: 30'sd5 <<< 21}; #1;
    chk(lo.l == (30'sd15 <<< 21), "3*5 exact");
    y = r2f(-0.5); l = '{s: 1'b0, z: 1'b0, l: 30'sd6 <<< 21}; #1;
    chk(lo.l == -(30'sd3 <<< 21), "-0.5*6 exact");
    y = r2f(1000.0); #1;
    chk(lo.l == LNS_MAX, "saturation");
    y = 32'h0; #1;
    chk(lo.l == 0 && !lo.z, "y=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
