// Error detector (ED) for the duplicated channel-1 module (DMR).
//
// When both replicas deliver a result in the same clock (a_valid and b_valid)
// and the results differ, `err` is high in that clock. Mismatches are also
// counted in err_count (saturating, cleared by reset or `clr`), so the
// detector can serve as a further reliability indicator. DMR only detects:
// the output `y` is replica a's result unchanged. The counter is this
// design's addition.
module error_detector #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [DATA_W-1:0] a,
  input  logic              a_valid,
  input  logic [DATA_W-1:0] b,
  input  logic              b_valid,
  output logic [DATA_W-1:0] y,
  output logic              y_valid,
  output logic              err,
  output logic [CNT_W-1:0]  err_count
);
  assign y       = a;
  assign y_valid = a_valid;
  assign err     = a_valid && b_valid && (a != b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       err_count <= '0;
    else if (clr)                     err_count <= '0;
    else if (err && err_count != '1)  err_count <= err_count + 1'b1;
  end
endmodule
