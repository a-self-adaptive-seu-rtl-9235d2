// BRAM upset rate estimator of the fault management unit.
//
// The estimate is the coarse one of the sensor concept: the mean of the last
// three measured times between BRAM upsets. Time is counted in ticks of
// TICK_DIV clocks (default: 1 s at 100 MHz). Each reported fault event closes
// the running interval and shifts it into a three-deep history; several events
// reported together are entered one per clock, the later ones as zero-length
// intervals. Instead of a mean, the block outputs the sum of the three
// intervals (three times the mean time to upset), so the rate thresholds
// become time thresholds and no division is needed.
//
// So that the estimate also falls when upsets stop, the open interval (time
// since the last upset) replaces the oldest closed one whenever that gives a
// larger sum; this, and starting with all intervals at their maximum (no
// upset seen: lowest rate), are this design's choices. sum3 is registered and
// follows an event by two clocks.
module seu_rate_estimator #(
  parameter int unsigned TICK_DIV = 100_000_000,
  parameter int unsigned IW       = 32,
  parameter int unsigned EV_W     = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ev_valid,
  input  logic [EV_W-1:0] ev_count,
  output logic [IW+1:0]   sum3,
  output logic            tick
);
  localparam int unsigned DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [DW-1:0]   div;
  logic [IW-1:0]   t_open;
  logic [IW-1:0]   iv [3];          // iv[0] newest
  logic [EV_W+1:0] pending;
  logic [IW+1:0]   s_closed, s_open;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div  <= '0;
      tick <= 1'b0;
    end else if (div == DW'(TICK_DIV - 1)) begin
      div  <= '0;
      tick <= 1'b1;
    end else begin
      div  <= div + 1'b1;
      tick <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_open  <= '0;
      pending <= '0;
      for (int i = 0; i < 3; i++) iv[i] <= '1;
    end else begin
      if (pending != 0) begin
        iv[2]   <= iv[1];
        iv[1]   <= iv[0];
        iv[0]   <= t_open;
        t_open  <= '0;
      end else if (tick && t_open != '1) begin
        t_open <= t_open + 1'b1;
      end
      pending <= pending - (EV_W+2)'(pending != 0) + (ev_valid ? (EV_W+2)'(ev_count) : '0);
    end
  end

  assign s_closed = (IW+2)'(iv[0]) + (IW+2)'(iv[1]) + (IW+2)'(iv[2]);
  assign s_open   = (IW+2)'(t_open) + (IW+2)'(iv[0]) + (IW+2)'(iv[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum3 <= '1;
    else        sum3 <= (s_open > s_closed) ? s_open : s_closed;
  end
endmodule
