// vs_mem: multi-port vector memory used for the vertex shader's storage:
// general-purpose registers, constant memory, vertex input buffer, vertex
// output buffer and instruction memory.
//
// DEPTH words of WIDTH bits, split into WIDTH/32 lanes that can be written
// individually (component write mask). One synchronous write port; NRD
// asynchronous read ports, so an operand read and its use in the first
// execute stage happen in the same cycle. A read of the word written in the
// same cycle returns the old contents. No reset: contents are undefined until
// written.
//
// The sizes (512 B GPR, 4 KB constant memory, 512 B VIB, 256 B VOB, 2 KB
// instruction memory) come from the source design; the port structure,
// word width and read timing are this design's own.
module vs_mem #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 128,
  parameter int unsigned NRD   = 3,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LANES = WIDTH / 32
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [AW-1:0]              waddr,
  input  logic [LANES-1:0]           wmask,
  input  logic [WIDTH-1:0]           wdata,
  input  logic [NRD-1:0][AW-1:0]     raddr,
  output logic [NRD-1:0][WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      for (int l = 0; l < LANES; l++)
        if (wmask[l]) mem[waddr][32*l +: 32] <= wdata[32*l +: 32];
  end

  always_comb
    for (int p = 0; p < NRD; p++) rdata[p] = mem[raddr[p]];
endmodule
