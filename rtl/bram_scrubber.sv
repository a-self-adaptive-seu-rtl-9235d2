// BRAM scrubber: the ECC block RAM of one fault detector plus the logic that
// repairs it.
//
// Access: in standalone sensor mode (`standalone` high) the address generator
// owns both ports; otherwise the user BRAM controller does. Reads take one
// clock: the word read at address A appears on usr_rd_data one clock after the
// read request, already corrected by the ECC.
//
// Repair: the read address and enable are delayed by one clock to line up with
// the ECC flags. When SBITERR is set for a valid read, the corrected word is
// written back to that delayed address in the next clock edge, so only the
// corrupted word line is scrubbed. A DBITERR word cannot be corrected; in
// standalone mode its known pattern is written back instead, so that each
// upset is counted once (this design's choice), in integrated mode it is left
// alone. A repair write has priority over a user write: usr_wr_ready is low in
// that clock and the user must hold its write (this design's choice).
//
// Every checked read that shows an error is reported on err_* for one clock:
// address, corrected data, stored check bits and the two flags.
module bram_scrubber #(
  parameter int unsigned DEPTH = seu_pkg::BRAM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          standalone,
  // address generator (standalone mode)
  input  logic          ag_rd_en,
  input  logic [AW-1:0] ag_rd_addr,
  input  logic          ag_wr_en,
  input  logic [AW-1:0] ag_wr_addr,
  input  logic [63:0]   ag_wr_data,
  // user BRAM controller (integrated mode)
  input  logic          usr_rd_en,
  input  logic [AW-1:0] usr_rd_addr,
  input  logic          usr_wr_en,
  input  logic [AW-1:0] usr_wr_addr,
  input  logic [63:0]   usr_wr_data,
  output logic          usr_wr_ready,
  output logic [63:0]   usr_rd_data,
  output logic          usr_rd_valid,
  // error events
  output logic          err_sbit,
  output logic          err_dbit,
  output logic [AW-1:0] err_addr,
  output logic [63:0]   err_data,
  output logic [7:0]    err_ecc,
  // upset model, passed to the ECC BRAM
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [71:0]   upset_mask
);
  import seu_pkg::*;

  logic          rden, wden;
  logic [AW-1:0] rdaddr, wraddr;
  logic [63:0]   di, dout;
  logic [7:0]    ecc;
  logic          sbiterr, dbiterr;
  logic          rd_vld_q;        // delayed read enable
  logic [AW-1:0] rd_addr_q;       // delayed read address
  logic          scrub_wr;
  logic [63:0]   scrub_data;

  assign rden   = standalone ? ag_rd_en   : usr_rd_en;
  assign rdaddr = standalone ? ag_rd_addr : usr_rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_vld_q  <= 1'b0;
      rd_addr_q <= '0;
    end else begin
      rd_vld_q  <= rden;
      if (rden) rd_addr_q <= rdaddr;
    end
  end

  always_comb begin
    err_sbit   = rd_vld_q && sbiterr;
    err_dbit   = rd_vld_q && dbiterr;
    scrub_wr   = err_sbit || (err_dbit && standalone);
    scrub_data = err_sbit ? dout : sensor_pattern(9'(rd_addr_q));
    if (scrub_wr) begin
      wden   = 1'b1;
      wraddr = rd_addr_q;
      di     = scrub_data;
    end else if (standalone) begin
      wden   = ag_wr_en;
      wraddr = ag_wr_addr;
      di     = ag_wr_data;
    end else begin
      wden   = usr_wr_en;
      wraddr = usr_wr_addr;
      di     = usr_wr_data;
    end
    usr_wr_ready = !scrub_wr && !standalone;
    usr_rd_data  = dout;
    usr_rd_valid = rd_vld_q && !standalone;
    err_addr     = rd_addr_q;
    err_data     = dout;
    err_ecc      = ecc;
  end

  ecc_bram #(.DEPTH(DEPTH), .AW(AW)) u_bram (
    .clk, .wden, .wraddr, .di, .rden, .rdaddr, .do_(dout), .ecc, .sbiterr, .dbiterr,
    .upset_en, .upset_addr, .upset_mask
  );
endmodule
