// tb_vertex_fetch: feeds vertex indices, answers memory reads from a model
// with random latency, and checks the addresses, the VIB contents, the
// index-FIFO pushes and the vib_full / vib_release handshake. The monitors
// sample the combinational outputs at the falling clock edge, half a cycle
// away from the state change.
module tb_vertex_fetch;
  logic clk = 0, rst_n = 0;
  logic idx_valid = 0, idx_ready, mem_req, mem_rvalid = 0, vib_we, vib_full, vib_release = 0;
  logic ififo_push, ififo_ready;
  logic [31:0] idx = 0, ififo_data;
  logic [19:0] cfg_vbase = 20'h100, mem_addr;
  logic [5:0] cfg_nattr = 6'd5;
  logic [127:0] mem_rdata = 0, vib_wdata;
  logic [4:0] vib_waddr;
  logic [127:0] vib [32];
  int checks = 0, failures = 0, pushes = 0, n_block = 0;

  vertex_fetch #(.AW(20), .VIB_D(32)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [127:0] memval(input logic [19:0] a);
    return {12'hABC, a, 32'h1234_0000 | 32'(a), ~a, 12'h0, 32'(a) * 32'd7};
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory model: answers each request after 1..4 cycles
  always @(negedge clk) if (mem_req) begin
    automatic logic [19:0] a = mem_addr;
    fork begin
      repeat ($urandom_range(1, 4)) @(posedge clk);
      #1 mem_rvalid = 1; mem_rdata = memval(a);
      @(posedge clk); #1 mem_rvalid = 0;
    end join_none
  end
  always @(negedge clk) if (vib_we) vib[vib_waddr] <= vib_wdata;
  always @(negedge clk) if (ififo_push) begin
    pushes++;
    chk(ififo_data == idx, "pushed index");
  end

  initial begin
    ififo_ready = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int v = 0; v < 30; v++) begin
      idx = $urandom_range(0, 1000);
      cfg_nattr = 6'($urandom_range(1, 8));
      ififo_ready = (v % 7 != 3);
      idx_valid = 1;
      #1;
      while (!idx_ready) begin
        n_block++;
        @(posedge clk); #1;
        if (v % 7 == 3) ififo_ready = 1;
        #1;
      end
      @(posedge clk); #1 idx_valid = 0;
      while (!vib_full) begin @(posedge clk); #1; end
      chk(pushes == v + 1, "one push per vertex");
      for (int a = 0; a < int'(cfg_nattr); a++)
        chk(vib[a] == memval(cfg_vbase + 20'(idx) * 20'(cfg_nattr) + 20'(a)), $sformatf("vertex %0d attr %0d", v, a));
      repeat (3) @(posedge clk);
      #1 chk(!idx_ready, "no accept while VIB full");
      vib_release = 1; @(posedge clk); #1 vib_release = 0;
      chk(!vib_full, "released");
    end
    chk(n_block > 0, "index FIFO back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
