// tb_swizzle: checks every component selection and the negate bit.
module tb_swizzle;
  import lgp_pkg::*;
  vec_t v, o;
  logic [7:0] sel;
  logic neg;
  int checks = 0, failures = 0;
  swizzle dut (.v(v), .sel(sel), .neg(neg), .o(o));

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int c = 0; c < 4; c++) v[c] = $urandom;
      sel = 8'(i); neg = i[8];
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (o[c] != (v[sel[2*c +: 2]] ^ {neg, 31'd0})) begin
          failures++; $display("FAIL sel=%h c=%0d", sel, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
