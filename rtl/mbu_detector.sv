// Multiple-bit upset (MBU) detector of one BRAM fault detector.
//
// The document interprets two or more corrupted bits of one BRAM primitive
// within one scrub cycle, a period in the range of seconds, as a multiple-bit
// upset. This block divides time into fixed windows of WINDOW clocks and adds
// up the bits reported in each window: one per SBITERR event, two per
// DBITERR event. If a window closes with two or more bits, the MBU count is
// incremented. Fixed windows (an MBU split across a window edge is counted
// as two single upsets), the default of one second at 100 MHz and the
// saturating count are this design's choices.
//
// Timing: err_sbit/err_dbit are sampled every clock, including the last
// clock of a window; the count changes one clock after the window closes.
// `clr` (synchronous) zeroes the count and restarts the window.
module mbu_detector #(
  parameter int unsigned WINDOW = 100_000_000,
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned WW     = (WINDOW > 1) ? $clog2(WINDOW) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             err_sbit,
  input  logic             err_dbit,
  output logic [CNT_W-1:0] mbu_cnt
);
  localparam logic [WW-1:0] LAST = WW'(WINDOW - 1);

  logic [WW-1:0] wcnt;   // clock within the window
  logic [1:0]    bits;   // bits seen so far in the window, saturating at 3
  logic [2:0]    total;  // including this clock

  always_comb total = 3'(bits) + (err_sbit ? 3'd1 : 3'd0) + (err_dbit ? 3'd2 : 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt    <= '0;
      bits    <= '0;
      mbu_cnt <= '0;
    end else if (clr) begin
      wcnt    <= '0;
      bits    <= '0;
      mbu_cnt <= '0;
    end else if (wcnt == LAST) begin
      wcnt <= '0;
      bits <= '0;
      if (total >= 3'd2 && mbu_cnt != '1) mbu_cnt <= mbu_cnt + 1'b1;
    end else begin
      wcnt <= wcnt + 1'b1;
      bits <= (total > 3'd3) ? 2'd3 : total[1:0];
    end
  end
endmodule
