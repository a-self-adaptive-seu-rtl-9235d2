// Majority voter for the triplicated channel-1 module (TMR).
//
// Each output bit is the 2-of-3 majority of the three replica bits, so any
// error confined to one replica is masked. `mismatch` marks, per replica, that
// its result differs from the voted one (for diagnosis). The result is valid
// when all three replicas are. Purely combinational. Bitwise voting is this
// design's choice; the document only places a voter behind the replicas.
module voter #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] d [3],
  input  logic              d_valid [3],
  output logic [DATA_W-1:0] y,
  output logic              y_valid,
  output logic [2:0]        mismatch
);
  always_comb begin
    y       = (d[0] & d[1]) | (d[0] & d[2]) | (d[1] & d[2]);
    y_valid = d_valid[0] && d_valid[1] && d_valid[2];
    for (int k = 0; k < 3; k++) mismatch[k] = y_valid && (d[k] != y);
  end
endmodule
