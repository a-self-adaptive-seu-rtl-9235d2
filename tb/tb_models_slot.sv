// Behavioural stand-in for a module of the partial reconfigurable region, for
// testbenches only. It computes y = x * (2*chan + 3) + 17*chan with two clocks
// of latency, where `chan` (0..2) says which channel's module is loaded in the
// slot; `rst` empties the pipeline. `corrupt` XORs a constant into the result,
// as an upset in this replica would.
module tb_models_slot #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [1:0]        chan,
  input  logic              corrupt,
  input  logic [DATA_W-1:0] x,
  input  logic              x_valid,
  output logic [DATA_W-1:0] y,
  output logic              y_valid
);
  logic [DATA_W-1:0] s1;
  logic              v1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1      <= 1'b0;
      y_valid <= 1'b0;
      s1      <= '0;
      y       <= '0;
    end else begin
      v1      <= x_valid;
      s1      <= x * DATA_W'(2 * chan + 3) + DATA_W'(17 * chan);
      y_valid <= v1;
      y       <= s1 ^ (corrupt ? DATA_W'(16'h0101) : '0);
    end
  end
endmodule
