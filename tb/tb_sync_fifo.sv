// tb_sync_fifo: random push/pop traffic against a reference queue for the
// index-FIFO size (16 x 32): order, level, full and empty flags. Both the
// full and the empty condition must occur.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push_valid = 0, push_ready, pop_valid, pop_ready = 0;
  logic [31:0] push_data = 0, pop_data;
  logic [4:0] level;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [31:0] q [$];

  sync_fifo #(.DEPTH(16), .WIDTH(32)) dut (.*);
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
    for (int n = 0; n < 6000; n++) begin
      // phases biased towards filling and towards draining
      push_valid = ($urandom_range(0, 99) < ((n / 500) % 2 ? 80 : 25));
      pop_ready  = ($urandom_range(0, 99) < ((n / 500) % 2 ? 25 : 80));
      push_data  = $urandom;
      #1;
      chk(level == 5'(q.size()), $sformatf("level %0d vs %0d", level, q.size()));
      chk(push_ready == (q.size() < 16), "push_ready");
      chk(pop_valid == (q.size() > 0), "pop_valid");
      if (pop_valid) chk(pop_data == q[0], "order");
      if (!push_ready) n_full++;
      if (!pop_valid) n_empty++;
      @(posedge clk);
      if (pop_valid && pop_ready) void'(q.pop_front());
      if (push_valid && push_ready) q.push_back(push_data);
      #1;
    end
    chk(n_full > 0, "FIFO never full");
    chk(n_empty > 0, "FIFO never empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
