// Testbench for fault_memory: each error event stores address, data, check
// bits and flags, readable through the word map; counters are mirrored one
// clock late; clr drops the valid flag.
module tb_fault_memory;
  import seu_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0, err_sbit = 1'b0, err_dbit = 1'b0;
  logic [8:0]  err_addr = '0;
  logic [63:0] err_data = '0;
  logic [7:0]  err_ecc = '0;
  logic [15:0] sbit_cnt = '0, dbit_cnt = '0, mbu_cnt = '0;
  logic [2:0]  rd_addr = '0;
  logic [31:0] rd_data;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fault_memory dut (.clk, .rst_n, .clr, .err_sbit, .err_dbit, .err_addr, .err_data, .err_ecc,
                    .sbit_cnt, .dbit_cnt, .mbu_cnt, .rd_addr, .rd_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] w);
    rd_addr = a;
    #1;
    w = rd_data;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    logic        s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rd(FM_STATUS, w);
    check(w[31] == 1'b0, "no record after reset");
    for (int i = 0; i < 100; i++) begin
      logic [8:0]  a;
      logic [63:0] d;
      logic [7:0]  e;
      a = 9'($urandom); d = {$urandom(), $urandom()}; e = 8'($urandom);
      s = 1'($urandom_range(0, 1));
      err_sbit = s; err_dbit = !s; err_addr = a; err_data = d; err_ecc = e;
      sbit_cnt = 16'($urandom); dbit_cnt = 16'($urandom); mbu_cnt = 16'($urandom);
      @(negedge clk);
      err_sbit = 1'b0; err_dbit = 1'b0; err_addr = '0; err_data = '0;
      rd(FM_STATUS, w); check(w == {1'b1, !s, s, 20'd0, a}, "status word");
      rd(FM_DATA_L, w); check(w == d[31:0], "data low");
      rd(FM_DATA_H, w); check(w == d[63:32], "data high");
      rd(FM_ECC, w); check(w == {24'd0, e}, "ecc");
      rd(FM_SBITC, w); check(w == {16'd0, sbit_cnt}, "sbit counter");
      rd(FM_DBITC, w); check(w == {16'd0, dbit_cnt}, "dbit counter");
      rd(FM_MBUC, w); check(w == {16'd0, mbu_cnt}, "mbu counter");
      rd(3'd7, w); check(w == 32'd0, "unused word reads zero");
      @(negedge clk);
      rd(FM_DATA_L, w); check(w == d[31:0], "record held without new error");
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    rd(FM_STATUS, w);
    check(w[31] == 1'b0, "clr drops valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
