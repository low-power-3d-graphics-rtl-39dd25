// sync_fifo: first-in first-out buffer with an occupancy output, used as the
// matrix FIFO (RISC -> vertex shader) and the index FIFO (vertex fetch ->
// rendering engine).
//
// Valid/ready on both sides: a word is written when push_valid && push_ready
// (not full) and removed when pop_valid && pop_ready (pop_valid = not empty;
// pop_data shows the oldest word). level counts the stored words; the
// frequency selectors compare it with their reference point.
// All on one clock; DEPTH must be a power of two.
//
// The depths follow the source design (4 KB matrix FIFO = 256 x 128 bits,
// 64 B index FIFO = 16 x 32 bits); the handshake is this design's own.
module sync_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_valid,
  output logic             push_ready,
  input  logic [WIDTH-1:0] push_data,
  output logic             pop_valid,
  input  logic             pop_ready,
  output logic [WIDTH-1:0] pop_data,
  output logic [AW:0]      level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic do_push, do_pop;

  assign level      = wp - rp;
  assign push_ready = (level != (AW+1)'(DEPTH));
  assign pop_valid  = (level != '0);
  assign pop_data   = mem[rp[AW-1:0]];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wp[AW-1:0]] <= push_data;

  a_level: assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));
endmodule
