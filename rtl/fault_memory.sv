// Fault memory of one BRAM fault detector.
//
// Whenever the scrubber reports an error (err_sbit or err_dbit) the block
// stores the record of that error: BRAM address, data word, check bits and
// which flag was set, and marks the record valid. The SBITERR and DBITERR
// counter values are copied into it every clock, so they lag the counters by
// one clock; `clr` zeroes the copies at once, together with the counters.
// The document gives the fields; keeping only the latest error record (the
// counters carry the totals) is this design's choice. The MBU count of the
// multiple-bit upset detector is copied the same way.
//
// The contents are read one 32-bit word at a time through rd_addr/rd_data
// (combinational), using the word map of seu_pkg (FM_*). `clr` drops the
// valid flag of the record.
module fault_memory #(
  parameter int unsigned CNT_W = 16,
  parameter int unsigned AW    = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             err_sbit,
  input  logic             err_dbit,
  input  logic [AW-1:0]    err_addr,
  input  logic [63:0]      err_data,
  input  logic [7:0]       err_ecc,
  input  logic [CNT_W-1:0] sbit_cnt,
  input  logic [CNT_W-1:0] dbit_cnt,
  input  logic [CNT_W-1:0] mbu_cnt,
  input  logic [2:0]       rd_addr,
  output logic [31:0]      rd_data
);
  import seu_pkg::*;

  typedef struct packed {
    logic          valid;
    logic          dbit;
    logic          sbit;
    logic [AW-1:0] addr;
    logic [63:0]   data;
    logic [7:0]    ecc;
  } fault_rec_t;

  fault_rec_t       rec;
  logic [CNT_W-1:0] sbit_q, dbit_q, mbu_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec    <= '0;
      sbit_q <= '0;
      dbit_q <= '0;
      mbu_q  <= '0;
    end else begin
      sbit_q <= clr ? '0 : sbit_cnt;
      dbit_q <= clr ? '0 : dbit_cnt;
      mbu_q  <= clr ? '0 : mbu_cnt;
      if (err_sbit || err_dbit)
        rec <= '{valid: 1'b1, dbit: err_dbit, sbit: err_sbit,
                 addr: err_addr, data: err_data, ecc: err_ecc};
      else if (clr)
        rec.valid <= 1'b0;
    end
  end

  always_comb begin
    unique case (rd_addr)
      FM_STATUS: rd_data = {rec.valid, rec.dbit, rec.sbit, (29 - AW)'(0), rec.addr};
      FM_DATA_L: rd_data = rec.data[31:0];
      FM_DATA_H: rd_data = rec.data[63:32];
      FM_ECC:    rd_data = {24'd0, rec.ecc};
      FM_SBITC:  rd_data = 32'(sbit_q);
      FM_DBITC:  rd_data = 32'(dbit_q);
      FM_MBUC:   rd_data = 32'(mbu_q);
      default:   rd_data = '0;
    endcase
  end
endmodule
