// tb_flp_add: checks the floating-point adder/subtractor against real
// arithmetic (truncation: error below 2^-22 of the larger operand), plus exact
// cases, cancellation to zero, zero operands and saturation.
module tb_flp_add;
  import lgp_pkg::*;
  import tb_pkg::*;
  flp_t a, b, r;
  logic sub;
  int checks = 0, failures = 0;
  flp_add dut (.a(a), .b(b), .sub(sub), .r(r));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ra, rb, exp, big;
    a = r2f(3.0); b = r2f(5.0); sub = 0; #1; chk(r == r2f(8.0), "3+5");
    a = r2f(3.0); b = r2f(5.0); sub = 1; #1; chk(r == r2f(-2.0), "3-5");
    a = r2f(1.5); b = r2f(1.5); sub = 1; #1; chk(r == 32'h0, "x-x");
    a = r2f(7.25); b = 32'h0; sub = 0; #1; chk(r == r2f(7.25), "x+0");
    a = 32'h0; b = r2f(7.25); sub = 1; #1; chk(r == r2f(-7.25), "0-x");
    a = FLP_MAX; b = FLP_MAX; sub = 0; #1; chk(r == FLP_MAX, "saturate");
    a = r2f(1.0); b = r2f($pow(2.0, -30.0)); sub = 0; #1; chk(r == r2f(1.0), "tiny");
    for (int i = 0; i < 5000; i++) begin
      ra = rnd(-20, 20); rb = (i % 4 == 0) ? -ra * (1.0 + rnd(-20, -8, 1)) : rnd(-20, 20);
      a = r2f(ra); b = r2f(rb); sub = 1'($urandom_range(0, 1)); #1;
      ra = f2r(a); rb = f2r(b);
      exp = sub ? ra - rb : ra + rb;
      big = (ra < 0 ? -ra : ra) > (rb < 0 ? -rb : rb) ? (ra < 0 ? -ra : ra) : (rb < 0 ? -rb : rb);
      chk(close(f2r(r), exp, 0.0, big * $pow(2.0, -22.0)),
          $sformatf("%g %s %g = %g exp %g", ra, sub ? "-" : "+", rb, f2r(r), exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
