// tb_vs_mem: checks the multi-port memory against a reference array: masked
// lane writes, three independent asynchronous read ports, and read-old-data
// when reading the word being written.
module tb_vs_mem;
  logic clk = 0;
  logic we;
  logic [7:0] waddr;
  logic [3:0] wmask;
  logic [127:0] wdata;
  logic [2:0][7:0] raddr;
  logic [2:0][127:0] rdata;
  logic [127:0] refm [256];
  int checks = 0, failures = 0;

  vs_mem #(.DEPTH(256), .WIDTH(128), .NRD(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 1; wmask = 4'hF;
    for (int i = 0; i < 256; i++) begin
      waddr = 8'(i); wdata = {$urandom, $urandom, $urandom, $urandom}; refm[i] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 4000; n++) begin
      we = 1'($urandom_range(0, 1)); waddr = 8'($urandom); wmask = 4'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      for (int p = 0; p < 3; p++) raddr[p] = (p == 2) ? waddr : 8'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] != refm[raddr[p]]) begin failures++; $display("FAIL port %0d addr %0d", p, raddr[p]); end
      end
      @(posedge clk);
      if (we) for (int l = 0; l < 4; l++) if (wmask[l]) refm[waddr][32*l +: 32] = wdata[32*l +: 32];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
