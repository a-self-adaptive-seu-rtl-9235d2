// Address generation and pattern generator of a BRAM fault detector in
// standalone sensor mode.
//
// While `enable` is high the block first writes the deterministic pattern
// seu_pkg::sensor_pattern(addr) into every word, one word per clock (DEPTH
// clocks), then raises `init_done` and sweeps the whole address range with
// one read per clock, wrapping from DEPTH-1 to 0, for as long as it stays
// enabled. Dropping `enable` stops it; raising it again restarts with the
// pattern fill. The pattern and the sweep rate of one read per clock are
// this design's choices; the document asks only for a deterministic pattern
// and a cyclic sweep of the complete address range.
module address_generator #(
  parameter int unsigned DEPTH = seu_pkg::BRAM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [63:0]   wr_data,
  output logic          init_done
);
  import seu_pkg::*;

  typedef enum logic [1:0] {AG_IDLE, AG_INIT, AG_SCAN} ag_state_e;
  ag_state_e   state;
  logic [AW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= AG_IDLE;
      cnt   <= '0;
    end else if (!enable) begin
      state <= AG_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        AG_IDLE: begin
          state <= AG_INIT;
          cnt   <= '0;
        end
        AG_INIT: begin
          if (cnt == AW'(DEPTH - 1)) begin
            state <= AG_SCAN;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        AG_SCAN: cnt <= (cnt == AW'(DEPTH - 1)) ? '0 : cnt + 1'b1;
        default: state <= AG_IDLE;
      endcase
    end
  end

  always_comb begin
    wr_en     = (state == AG_INIT);
    wr_addr   = cnt;
    wr_data   = sensor_pattern(9'(cnt));
    rd_en     = (state == AG_SCAN);
    rd_addr   = cnt;
    init_done = (state == AG_SCAN);
  end
endmodule
