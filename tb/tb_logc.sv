// tb_logc: checks the logarithmic converter against log2 computed in real
// arithmetic (error bound 6e-4 in log2, the fit's 4.5e-4 plus truncation),
// and checks sign, zero flag and the exact value at x = 1.0.
module tb_logc;
  import lgp_pkg::*;
  import tb_pkg::*;
  flp_t x;
  lns_t y;
  int checks = 0, failures = 0;
  logc dut (.x(x), .y(y));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real r, exp;
    x = 32'h3F80_0000; #1;   // 1.0: k = 0, m = 0 -> b_0 / 4
    chk(y.l == 30'sd42 && !y.s && !y.z, "log2(1)");
    x = 32'h0000_0000; #1;
    chk(y.z, "zero flag");
    x = 32'hC100_0000; #1;   // -8
    chk(y.s && !y.z && close(l2r(y), 3.0, 0.0, 6e-4), "log2(-8)");
    for (int i = 0; i < 3000; i++) begin
      r = rnd(-60, 60);
      x = r2f(r); #1;
      exp = $ln(r < 0 ? -r : r) / $ln(2.0);
      chk(close(l2r(y), exp, 0.0, 6e-4) && (y.s == (r < 0)) && !y.z,
          $sformatf("x=%g got %f exp %f", r, l2r(y), exp));
    end
    // sweep every segment finely around 1..2
    for (int i = 0; i < 1024; i++) begin
      x = {9'b0_0111_1111, 23'(i << 13)}; #1;
      exp = $ln(f2r(x)) / $ln(2.0);
      chk(close(l2r(y), exp, 0.0, 6e-4), $sformatf("sweep %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
