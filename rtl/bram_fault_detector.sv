// BRAM fault detector (BFD): one BRAM used as a radiation particle sensor.
//
// Structure: a BRAM scrubber with its ECC BRAM, an address generator for
// standalone sensor mode, one counter each for SBITERR and DBITERR events, a
// multiple-bit upset detector over windows of MBU_WINDOW clocks, a
// fault memory holding the latest error record and the counters, and the bus
// access control that serves the fault memory to the fault management unit.
//
// Modes: `standalone` high makes the BRAM a dedicated sensor filled with a
// known pattern and swept continuously; low leaves it to the user BRAM
// controller (integrated sensor), which must sweep the addresses itself for
// errors to be found. `clr` clears all counters and the record valid flag.
// Counter and record updates appear on the bus two clocks after the failing
// read returns its data.
module bram_fault_detector #(
  parameter int unsigned DEPTH = seu_pkg::BRAM_DEPTH,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned MBU_WINDOW = 100_000_000,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              standalone,
  input  logic              clr,
  output logic              init_done,
  // star bus
  input  seu_pkg::fbus_req_t bus_req,
  output seu_pkg::fbus_rsp_t bus_rsp,
  // user BRAM controller
  input  logic              usr_rd_en,
  input  logic [AW-1:0]     usr_rd_addr,
  input  logic              usr_wr_en,
  input  logic [AW-1:0]     usr_wr_addr,
  input  logic [63:0]       usr_wr_data,
  output logic              usr_wr_ready,
  output logic [63:0]       usr_rd_data,
  output logic              usr_rd_valid,
  // upset model
  input  logic              upset_en,
  input  logic [AW-1:0]     upset_addr,
  input  logic [71:0]       upset_mask
);
  logic          ag_rd_en, ag_wr_en;
  logic [AW-1:0] ag_rd_addr, ag_wr_addr;
  logic [63:0]   ag_wr_data;
  logic          err_sbit, err_dbit;
  logic [AW-1:0] err_addr;
  logic [63:0]   err_data;
  logic [7:0]    err_ecc;
  logic [CNT_W-1:0] sbit_cnt, dbit_cnt, mbu_cnt;
  logic [2:0]    fm_addr;
  logic [31:0]   fm_data;

  address_generator #(.DEPTH(DEPTH), .AW(AW)) u_agen (
    .clk, .rst_n, .enable(standalone),
    .rd_en(ag_rd_en), .rd_addr(ag_rd_addr),
    .wr_en(ag_wr_en), .wr_addr(ag_wr_addr), .wr_data(ag_wr_data), .init_done
  );

  bram_scrubber #(.DEPTH(DEPTH), .AW(AW)) u_scrub (
    .clk, .rst_n, .standalone,
    .ag_rd_en, .ag_rd_addr, .ag_wr_en, .ag_wr_addr, .ag_wr_data,
    .usr_rd_en, .usr_rd_addr, .usr_wr_en, .usr_wr_addr, .usr_wr_data,
    .usr_wr_ready, .usr_rd_data, .usr_rd_valid,
    .err_sbit, .err_dbit, .err_addr, .err_data, .err_ecc,
    .upset_en, .upset_addr, .upset_mask
  );

  err_counter #(.WIDTH(CNT_W)) u_sbit_cnt (.clk, .rst_n, .clr, .inc(err_sbit), .count(sbit_cnt));
  err_counter #(.WIDTH(CNT_W)) u_dbit_cnt (.clk, .rst_n, .clr, .inc(err_dbit), .count(dbit_cnt));

  mbu_detector #(.WINDOW(MBU_WINDOW), .CNT_W(CNT_W)) u_mbu (
    .clk, .rst_n, .clr, .err_sbit, .err_dbit, .mbu_cnt
  );

  fault_memory #(.CNT_W(CNT_W), .AW(AW)) u_fmem (
    .clk, .rst_n, .clr, .err_sbit, .err_dbit, .err_addr, .err_data, .err_ecc,
    .sbit_cnt, .dbit_cnt, .mbu_cnt, .rd_addr(fm_addr), .rd_data(fm_data)
  );

  bus_access_control u_bac (.clk, .rst_n, .req(bus_req), .rsp(bus_rsp), .fm_addr, .fm_data);
endmodule
