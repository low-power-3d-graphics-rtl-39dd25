// freq_sel: frequency selector of one power domain.
//
// The workload of a domain is measured as the occupancy of a FIFO. Every
// PERIOD cycles the occupancy is compared with a reference point: each entry
// below the reference raises the target frequency by STEP MHz, each entry
// above lowers it by STEP MHz, within [N_MIN, N_MAX]. The output n is the
// divider ratio of the domain's PLL, whose reference is 1 MHz, so n is the
// target frequency in MHz. The PLL then relocks and its regulator moves the
// supply voltage with it. After reset n = N_MIN.
//
// Interface: level, ref_level in; n (divider ratio) and changed (one-cycle
// pulse when n takes a new value) out.
// The comparison of FIFO level with a reference point, the 1 MHz reference
// and the 89-200 MHz range come from the source design; the proportional
// update rule, PERIOD and STEP are this design's own.
module freq_sel #(
  parameter int unsigned LVL_W  = 5,
  parameter int unsigned N_MIN  = 89,
  parameter int unsigned N_MAX  = 200,
  parameter int unsigned STEP   = 4,
  parameter int unsigned PERIOD = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LVL_W-1:0] level,
  input  logic [LVL_W-1:0] ref_level,
  output logic [7:0]       n,
  output logic             changed
);
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  logic [CW-1:0] cnt;
  logic signed [15:0] err, nxt;

  always_comb begin
    err = 16'(signed'({1'b0, ref_level})) - 16'(signed'({1'b0, level}));
    nxt = 16'(signed'({8'd0, n})) + err * 16'(STEP);
    if (nxt > 16'(N_MAX)) nxt = 16'(N_MAX);
    if (nxt < 16'(N_MIN)) nxt = 16'(N_MIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      n       <= 8'(N_MIN);
      changed <= 1'b0;
    end else begin
      changed <= 1'b0;
      if (cnt == CW'(PERIOD - 1)) begin
        cnt <= '0;
        if (nxt[7:0] != n) begin
          n       <= nxt[7:0];
          changed <= 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  a_range: assert property (@(posedge clk) disable iff (!rst_n) n >= 8'(N_MIN) && n <= 8'(N_MAX));
endmodule
