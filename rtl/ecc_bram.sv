// ECC block RAM: a simple-dual-port 512 x 72 bit memory with built-in SECDED.
//
// A write stores the 64-bit word DI together with its 8 check bits computed
// by seu_pkg::secded_encode. A read returns, one clock after RDEN, the
// corrected word on DO, the stored check bits on ECC, and the SBITERR /
// DBITERR flags. As in the vendor primitive, an error is corrected only at the
// output: the stored word stays wrong until someone writes it back (the BRAM
// scrubber does that). Port names follow the primitive.
//
// upset_en / upset_addr / upset_mask model radiation: the mask is XORed into
// the stored 72-bit word (bits 63:0 data, 71:64 check bits). This port is
// this design's own addition so that upsets can be produced in simulation;
// a real implementation ties it to zero. If a write and an upset hit the same
// word in the same clock, the write wins.
module ecc_bram #(
  parameter int unsigned DEPTH = seu_pkg::BRAM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // write port
  input  logic          wden,
  input  logic [AW-1:0] wraddr,
  input  logic [63:0]   di,
  // read port
  input  logic          rden,
  input  logic [AW-1:0] rdaddr,
  output logic [63:0]   do_,
  output logic [7:0]    ecc,
  output logic          sbiterr,
  output logic          dbiterr,
  // upset model
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [71:0]   upset_mask
);
  import seu_pkg::*;

  logic [71:0] mem [DEPTH];
  logic [71:0] rd_word;
  secded_res_t res;

  always_ff @(posedge clk) begin
    if (upset_en && !(wden && wraddr == upset_addr))
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (wden)
      mem[wraddr] <= {secded_encode(di), di};
  end

  always_ff @(posedge clk) begin
    if (rden) rd_word <= mem[rdaddr];
  end

  always_comb begin
    res     = secded_decode(rd_word[63:0], rd_word[71:64]);
    do_     = res.data;
    ecc     = rd_word[71:64];
    sbiterr = res.sbiterr;
    dbiterr = res.dbiterr;
  end
endmodule
