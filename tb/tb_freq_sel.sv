// tb_freq_sel: checks the frequency selector's update rule against a model:
// one update every PERIOD cycles, n moves by STEP per entry of difference
// between reference and level, clamped to [89, 200], changed pulses exactly
// when n moves. Both clamps and both directions must occur.
module tb_freq_sel;
  localparam int PERIOD = 8, STEP = 4;
  logic clk = 0, rst_n = 0;
  logic [4:0] level = 0, ref_level = 5'd12;
  logic [7:0] n;
  logic changed;
  int checks = 0, failures = 0, model = 89, cnt = 0, up = 0, down = 0, at_min = 0, at_max = 0;

  freq_sel #(.LVL_W(5), .STEP(STEP), .PERIOD(PERIOD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(n == 8'd89, "reset value");
    for (int i = 0; i < 4000; i++) begin
      int nx, old;
      if (i % 64 == 0) level = 5'($urandom_range(0, 16));
      if (i > 2000 && i < 2600) level = 0;
      if (i > 3000 && i < 3600) level = 16;
      old = model;
      nx = model;
      if (cnt == PERIOD - 1) begin
        nx = model + (int'(ref_level) - int'(level)) * STEP;
        if (nx > 200) nx = 200;
        if (nx < 89) nx = 89;
      end
      @(posedge clk); #1;
      cnt = (cnt == PERIOD - 1) ? 0 : cnt + 1;
      model = nx;
      chk(n == 8'(model), $sformatf("cycle %0d n %0d model %0d", i, n, model));
      chk(changed == (model != old), "changed pulse");
      if (model > old) up++;
      if (model < old) down++;
      if (model == 200) at_max++;
      if (model == 89) at_min++;
    end
    chk(up > 0 && down > 0 && at_min > 0 && at_max > 0, "all directions and clamps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
