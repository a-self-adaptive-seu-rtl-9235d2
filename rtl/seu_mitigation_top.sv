// Self-adaptive SEU mitigation system: a block-RAM radiation sensor that sets
// the redundancy of a partially reconfigurable signal-processing region.
//
// BRAM sensor subsystem: N_BFD BRAM fault detectors, each an ECC block RAM
// that is swept, corrected and whose single- and double-bit errors are
// counted (multiple-bit upsets too, over one-second windows), connected
// point to point (star bus) to the fault management unit.
// The FMU polls all counters, estimates the BRAM upset rate from the mean of
// the last three times between upsets, and turns it into the redundancy level
// l (0 none, 1 channel-1 DMR, 2 channel-1 TMR).
//
// Adaptive subsystem: l goes to the reconfiguration control unit, which loads
// the configuration of that level from external memory through the ICAP and
// then switches the channel multiplexer, error detector and voter around the
// three module slots.
//
// Left outside, on ports: the ICAP primitive, the external bitstream memory,
// the modules of the three slots, and the user BRAM controllers of the
// detectors in integrated mode (usr_*, one set per detector). upset_* models
// radiation: upset_en[i] XORs upset_mask into word upset_addr of detector i's
// BRAM; tie it to zero in a real implementation.
module seu_mitigation_top #(
  parameter int unsigned N_BFD        = 64,
  parameter int unsigned DEPTH        = seu_pkg::BRAM_DEPTH,
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned TICK_DIV     = 100_000_000,
  parameter longint unsigned T_DMR    = 45532,
  parameter longint unsigned T_TMR    = 11712,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned DATA_W       = 16,
  parameter int unsigned BS_WORDS     = 65536,
  parameter logic [31:0] FAR_ADDR     = 32'h0000_0000,
  parameter int unsigned AW           = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // sensor control and reporting
  input  logic              standalone_cfg,
  input  logic              clear,
  output seu_pkg::level_e   level,
  output logic [33:0]       sum3,
  output logic [15:0]       total_events,
  output logic              uart_txd,
  output logic [N_BFD-1:0]  bfd_init_done,
  // radiation upset model
  input  logic [N_BFD-1:0]  upset_en,
  input  logic [AW-1:0]     upset_addr,
  input  logic [71:0]       upset_mask,
  // user BRAM controllers (integrated sensor mode)
  input  logic              usr_rd_en    [N_BFD],
  input  logic [AW-1:0]     usr_rd_addr  [N_BFD],
  input  logic              usr_wr_en    [N_BFD],
  input  logic [AW-1:0]     usr_wr_addr  [N_BFD],
  input  logic [63:0]       usr_wr_data  [N_BFD],
  output logic              usr_wr_ready [N_BFD],
  output logic [63:0]       usr_rd_data  [N_BFD],
  output logic              usr_rd_valid [N_BFD],
  // adaptive subsystem
  output seu_pkg::level_e   level_active,
  output logic              reconf_busy,
  output logic              reconf_done,
  input  logic [DATA_W-1:0] ch_in_data   [3],
  input  logic              ch_in_valid  [3],
  output logic [DATA_W-1:0] ch_out_data  [3],
  output logic              ch_out_valid [3],
  output logic              dmr_err,
  output logic [15:0]       dmr_err_count,
  output logic [2:0]        tmr_mismatch,
  output logic [DATA_W-1:0] slot_in_data   [3],
  output logic              slot_in_valid  [3],
  input  logic [DATA_W-1:0] slot_out_data  [3],
  input  logic              slot_out_valid [3],
  output logic [2:0]        slot_rst,
  output logic              icap_csib,
  output logic              icap_rdwrb,
  output logic [31:0]       icap_i,
  output logic              mem_rd_en,
  output logic [31:0]       mem_addr,
  input  logic              mem_rd_valid,
  input  logic [31:0]       mem_rd_data
);
  import seu_pkg::*;

  fbus_req_t bus_req [N_BFD];
  fbus_rsp_t bus_rsp [N_BFD];
  logic      bfd_standalone, bfd_clr;

  for (genvar i = 0; i < N_BFD; i++) begin : g_bfd
    bram_fault_detector #(.DEPTH(DEPTH), .CNT_W(CNT_W), .MBU_WINDOW(TICK_DIV), .AW(AW)) u_bfd (
      .clk, .rst_n, .standalone(bfd_standalone), .clr(bfd_clr), .init_done(bfd_init_done[i]),
      .bus_req(bus_req[i]), .bus_rsp(bus_rsp[i]),
      .usr_rd_en(usr_rd_en[i]), .usr_rd_addr(usr_rd_addr[i]),
      .usr_wr_en(usr_wr_en[i]), .usr_wr_addr(usr_wr_addr[i]), .usr_wr_data(usr_wr_data[i]),
      .usr_wr_ready(usr_wr_ready[i]), .usr_rd_data(usr_rd_data[i]), .usr_rd_valid(usr_rd_valid[i]),
      .upset_en(upset_en[i]), .upset_addr, .upset_mask
    );
  end

  fault_management_unit #(
    .N_BFD(N_BFD), .CNT_W(CNT_W), .TICK_DIV(TICK_DIV), .IW(32),
    .T_DMR(T_DMR), .T_TMR(T_TMR), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_fmu (
    .clk, .rst_n, .standalone_cfg, .clear, .bfd_standalone, .bfd_clr,
    .bus_req, .bus_rsp, .level, .sum3, .total_events, .uart_txd
  );

  adaptive_subsystem #(.DATA_W(DATA_W), .BS_WORDS(BS_WORDS), .FAR_ADDR(FAR_ADDR)) u_adapt (
    .clk, .rst_n, .level_req(level), .level_active, .reconf_busy, .reconf_done,
    .ch_in_data, .ch_in_valid, .ch_out_data, .ch_out_valid,
    .dmr_err, .dmr_err_count, .tmr_mismatch,
    .slot_in_data, .slot_in_valid, .slot_out_data, .slot_out_valid, .slot_rst,
    .icap_csib, .icap_rdwrb, .icap_i, .mem_rd_en, .mem_addr, .mem_rd_valid, .mem_rd_data
  );
endmodule
