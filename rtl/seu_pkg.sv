// Shared types, constants and the SECDED code of the SEU mitigation system.
//
// The BRAM sensor stores 64-bit words protected by 8 check bits, the
// (72,64) single-error-correcting, double-error-detecting code of the ECC
// block RAM. The code here is an extended Hamming code: the 64 data bits
// occupy the non-power-of-two positions 1..71 of a Hamming code word, seven
// check bits sit at positions 1,2,4,...,64, and an eighth bit is the parity
// of all 71 positions. The choice of this particular matrix is this design's
// own; any (72,64) SECDED code fits the sensor.
//
// The package also defines the star-bus request/response structs between the
// fault detectors and the fault management unit, the fault-memory word map
// and the redundancy level type.
package seu_pkg;

  localparam int unsigned BRAM_DEPTH  = 512;   // words per BRAM primitive
  localparam int unsigned BRAM_DW     = 64;    // data bits per word
  localparam int unsigned BRAM_EW     = 8;     // check bits per word
  localparam int unsigned BRAM_AW     = 9;     // address bits for 512 words

  // Redundancy level l: 0 none, 1 channel-1 DMR, 2 channel-1 TMR.
  typedef enum logic [1:0] {
    LVL_NONE = 2'd0,
    LVL_DMR  = 2'd1,
    LVL_TMR  = 2'd2
  } level_e;

  // Word map of a fault memory, as read over the star bus.
  localparam logic [2:0] FM_STATUS = 3'd0;  // {valid, dbit, sbit, 20'b0, addr[8:0]}
  localparam logic [2:0] FM_DATA_L = 3'd1;  // data word bits 31:0
  localparam logic [2:0] FM_DATA_H = 3'd2;  // data word bits 63:32
  localparam logic [2:0] FM_ECC    = 3'd3;  // check bits
  localparam logic [2:0] FM_SBITC  = 3'd4;  // SBITERR counter
  localparam logic [2:0] FM_DBITC  = 3'd5;  // DBITERR counter
  localparam logic [2:0] FM_MBUC   = 3'd6;  // multiple-bit upset counter

  // Star bus: one request/response pair per fault detector.
  typedef struct packed {
    logic       valid;
    logic [2:0] addr;
  } fbus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] data;
  } fbus_rsp_t;

  // Result of a SECDED check.
  typedef struct packed {
    logic [63:0] data;     // corrected data
    logic        sbiterr;  // one bit was wrong and has been corrected
    logic        dbiterr;  // two bits wrong, data not correctable
  } secded_res_t;

  function automatic logic [7:0] secded_encode(input logic [63:0] d);
    logic [71:1] cw;
    logic [6:0]  p;
    int unsigned k;
    cw = '0;
    k  = 0;
    for (int unsigned pos = 1; pos <= 71; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        cw[pos] = d[k];
        k++;
      end
    end
    p = '0;
    for (int unsigned pos = 1; pos <= 71; pos++)
      for (int unsigned b = 0; b < 7; b++)
        if (pos[b]) p[b] = p[b] ^ cw[pos];
    return {^{cw, p}, p};
  endfunction

  function automatic secded_res_t secded_decode(input logic [63:0] d, input logic [7:0] e);
    logic [71:1] cw;
    logic [6:0]  syn;
    logic        ovl;
    int unsigned k;
    secded_res_t r;
    cw = '0;
    k  = 0;
    for (int unsigned pos = 1; pos <= 71; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        cw[pos] = d[k];
        k++;
      end
    end
    for (int unsigned b = 0; b < 7; b++) cw[1 << b] = e[b];
    syn = '0;
    for (int unsigned pos = 1; pos <= 71; pos++)
      if (cw[pos]) syn = syn ^ 7'(pos);
    ovl = (^cw) ^ e[7];
    r.sbiterr = 1'b0;
    r.dbiterr = 1'b0;
    if (ovl) begin
      if (syn <= 7'd71) begin
        r.sbiterr = 1'b1;
        if (syn != 7'd0) cw[syn] = ~cw[syn];
      end else begin
        r.dbiterr = 1'b1;     // syndrome outside the word: more than one bit
      end
    end else if (syn != 7'd0) begin
      r.dbiterr = 1'b1;
    end
    k = 0;
    for (int unsigned pos = 1; pos <= 71; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        r.data[k] = cw[pos];
        k++;
      end
    end
    return r;
  endfunction

  // Deterministic standalone-mode content of word a: a 32-bit value derived
  // from the address and its complement, so every bit column holds zeros and
  // ones across the array.
  function automatic logic [63:0] sensor_pattern(input logic [8:0] a);
    logic [31:0] v;
    v = {a, ~a, a, 5'b10101} ^ 32'h5A3C_96E1;
    return {~v, v};
  endfunction

endpackage
