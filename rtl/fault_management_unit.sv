// Fault management unit (FMU) of the BRAM sensor subsystem.
//
// Tasks, each a sub-block: bus polling of the fault memories of all N_BFD
// detectors (bus_poller), estimation of the BRAM upset rate from the times
// between upsets (seu_rate_estimator), the redundancy calculation that turns
// the rate into the level l (redundancy_calc), reporting of radiation data
// over a UART, and reset and control of the detectors.
//
// Reset and control: `standalone_cfg` is registered and drives the mode of all
// detectors; a `clear` pulse is registered and then clears the detector
// counters and the poller's stored counts in the same clock.
//
// Report: after every polling round that found new events, and after every
// change of l, a 4-byte frame is sent: 0xA5, l, then the running total of
// events since the last clear (16 bits, saturating), high byte first. If a
// frame is still being sent, the next report waits for it; level and total
// are taken when a frame starts. The frame layout
// is this design's choice; the document only says radiation data is sent over
// UART.
//
// The document runs these tasks as software on a soft processor; here they
// are logic, which keeps the redundancy decision within a few clocks of the
// polling round that observed an upset.
module fault_management_unit #(
  parameter int unsigned N_BFD        = 64,
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned TICK_DIV     = 100_000_000,
  parameter int unsigned IW           = 32,
  parameter longint unsigned T_DMR    = 45532,
  parameter longint unsigned T_TMR    = 11712,
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic               clk,
  input  logic               rst_n,
  // reset & control
  input  logic               standalone_cfg,
  input  logic               clear,
  output logic               bfd_standalone,
  output logic               bfd_clr,
  // star bus
  output seu_pkg::fbus_req_t bus_req [N_BFD],
  input  seu_pkg::fbus_rsp_t bus_rsp [N_BFD],
  // results
  output seu_pkg::level_e    level,
  output logic [IW+1:0]      sum3,
  output logic [15:0]        total_events,
  output logic               uart_txd
);
  import seu_pkg::*;

  logic        round_done;
  logic [15:0] new_events;
  level_e      level_q;
  logic        report_pend;
  logic [1:0]  byte_idx;
  logic        sending;
  logic        tx_valid, tx_ready;
  logic [7:0]  tx_data;
  logic [15:0] total_snap;
  level_e      level_snap;
  logic        tick_unused;

  // reset & control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bfd_standalone <= 1'b1;
      bfd_clr        <= 1'b0;
    end else begin
      bfd_standalone <= standalone_cfg;
      bfd_clr        <= clear;
    end
  end

  bus_poller #(.N_BFD(N_BFD), .CNT_W(CNT_W), .EV_W(16)) u_poll (
    .clk, .rst_n, .clr(bfd_clr), .bus_req, .bus_rsp, .round_done, .new_events
  );

  seu_rate_estimator #(.TICK_DIV(TICK_DIV), .IW(IW), .EV_W(16)) u_rate (
    .clk, .rst_n, .ev_valid(round_done), .ev_count(new_events), .sum3, .tick(tick_unused)
  );

  redundancy_calc #(.IW(IW), .T_DMR(T_DMR), .T_TMR(T_TMR)) u_calc (
    .clk, .rst_n, .sum3, .level
  );

  // event total and report frames
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total_events <= '0;
      level_q      <= LVL_NONE;
      report_pend  <= 1'b0;
      sending      <= 1'b0;
      byte_idx     <= '0;
      total_snap   <= '0;
      level_snap   <= LVL_NONE;
    end else begin
      level_q <= level;
      if (bfd_clr) total_events <= '0;
      else if (round_done)
        total_events <= (17'(total_events) + 17'(new_events) > 17'hFFFF) ? 16'hFFFF
                        : total_events + new_events;
      if ((round_done && new_events != 0) || level != level_q) report_pend <= 1'b1;
      if (!sending && report_pend) begin
        sending     <= 1'b1;
        report_pend <= 1'b0;
        byte_idx    <= '0;
        total_snap  <= total_events;
        level_snap  <= level_q;
      end else if (sending && tx_ready) begin
        byte_idx <= byte_idx + 1'b1;
        if (byte_idx == 2'd3) sending <= 1'b0;
      end
    end
  end

  always_comb begin
    tx_valid = sending;
    unique case (byte_idx)
      2'd0: tx_data = 8'hA5;
      2'd1: tx_data = {6'd0, level_snap};
      2'd2: tx_data = total_snap[15:8];
      default: tx_data = total_snap[7:0];
    endcase
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .tx_valid, .tx_data, .tx_ready, .tx(uart_txd)
  );
endmodule
