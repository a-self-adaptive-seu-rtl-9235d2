// Error counter (SBITERR count or DBITERR count of a fault detector).
//
// Counts clocks in which `inc` is high; `clr` (synchronous) sets it to zero
// and wins over `inc`. The count saturates at all ones instead of wrapping so
// that the fault management unit never sees a count go down except after a
// clear. Width and saturation are this design's choices.
module err_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (clr)               count <= '0;
    else if (inc && count != '1) count <= count + 1'b1;
  end
endmodule
