// Behavioural model of the external bitstream memory, for testbenches only.
// A one-clock read request (rd_en, addr) is answered LATENCY clocks later by
// rd_valid with the word value(addr) = addr * 0x9E3779B1 + 0x1234567. There is
// nothing to store: the content is a formula.
module tb_models_ext #(
  parameter int unsigned LATENCY = 3
) (
  input  logic        clk,
  input  logic        rd_en,
  input  logic [31:0] addr,
  output logic        rd_valid,
  output logic [31:0] rd_data
);
  logic [LATENCY-1:0] vpipe = '0;
  logic [31:0]        dpipe [LATENCY];

  always_ff @(posedge clk) begin
    vpipe    <= {vpipe[LATENCY-2:0], rd_en};
    dpipe[0] <= addr * 32'h9E37_79B1 + 32'h0123_4567;
    for (int i = 1; i < LATENCY; i++) dpipe[i] <= dpipe[i-1];
  end
  assign rd_valid = vpipe[LATENCY-1];
  assign rd_data  = dpipe[LATENCY-1];
endmodule
