// UART transmitter, 8 data bits, no parity, one stop bit, LSB first.
//
// A byte is accepted when tx_valid and tx_ready are both high; tx_ready is low
// while the 10 bit times of the frame are sent. Each bit lasts CLKS_PER_BIT
// clocks (default 868: 115200 baud at 100 MHz). The line idles high. Frame
// format and baud rate are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       tx
);
  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [9:0]    shreg;
  logic [3:0]    nbits;
  logic [CW-1:0] cnt;

  assign tx_ready = (nbits == 0);
  assign tx       = shreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (nbits == 0) begin
      if (tx_valid) begin
        shreg <= {1'b1, tx_data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      shreg <= {1'b1, shreg[9:1]};
      nbits <= nbits - 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
