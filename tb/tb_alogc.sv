// tb_alogc: checks the antilogarithmic converter against 2^x computed in real
// arithmetic (relative bound 9e-4, the fit's 7.9e-4 plus truncation), and
// checks zero, sign, underflow to zero and saturation.
module tb_alogc;
  import lgp_pkg::*;
  import tb_pkg::*;
  lns_t x;
  flp_t y;
  int checks = 0, failures = 0;
  alogc dut (.x(x), .y(y));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real l, exp;
    x = '{s: 1'b0, z: 1'b1, l: '0}; #1;
    chk(y == 32'h0, "zero");
    x = '{s: 1'b0, z: 1'b0, l: -30'sd200 <<< 21}; #1;
    chk(y == 32'h0, "underflow");
    x = '{s: 1'b0, z: 1'b0, l: 30'sd200 <<< 21}; #1;
    chk(y == FLP_MAX, "saturation");
    x = '{s: 1'b1, z: 1'b0, l: 30'sd3 <<< 21}; #1;
    chk(close(f2r(y), -8.0, 9e-4, 0.0), "-2^3");
    for (int i = 0; i < 3000; i++) begin
      x.s = 1'b0; x.z = 1'b0;
      x.l = 30'($signed($urandom_range(0, 32'h0FFF_FFFF)) - 32'sh0800_0000) >>> 1;
      #1;
      l = l2r(x);
      exp = $pow(2.0, l);
      chk(close(f2r(y), exp, 9e-4, 0.0), $sformatf("l=%f got %g exp %g", l, f2r(y), exp));
    end
    for (int i = 0; i < 2048; i++) begin
      x = '{s: 1'b0, z: 1'b0, l: 30'(i << 10)};
      #1;
      exp = $pow(2.0, l2r(x));
      chk(close(f2r(y), exp, 9e-4, 0.0), $sformatf("sweep %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
