// Testbench for bram_fault_detector in standalone mode: injected single and
// double upsets must show up, once each, in the SBITERR/DBITERR counters and
// in the error record read over the star bus; clr clears the counters. A short
// MBU phase checks that two bits within one window count as one multiple-bit
// upset and one bit does not. A short integrated-mode phase checks the user
// port and counting of user reads.
module tb_bram_fault_detector;
  import seu_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, standalone = 1'b1, clr = 1'b0, init_done;
  fbus_req_t   bus_req;
  fbus_rsp_t   bus_rsp;
  logic        usr_rd_en = 1'b0, usr_wr_en = 1'b0, usr_wr_ready, usr_rd_valid;
  logic [8:0]  usr_rd_addr = '0, usr_wr_addr = '0;
  logic [63:0] usr_wr_data = '0, usr_rd_data;
  logic        upset_en = 1'b0;
  logic [8:0]  upset_addr = '0;
  logic [71:0] upset_mask = '0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_fault_detector #(.MBU_WINDOW(2048)) dut (.clk, .rst_n, .standalone, .clr, .init_done, .bus_req, .bus_rsp,
    .usr_rd_en, .usr_rd_addr, .usr_wr_en, .usr_wr_addr, .usr_wr_data, .usr_wr_ready,
    .usr_rd_data, .usr_rd_valid, .upset_en, .upset_addr, .upset_mask);

  function automatic logic [63:0] expect_pattern(input int a);
    logic [8:0]  x;
    logic [31:0] v;
    x = 9'(a);
    v = {x, ~x, x, 5'b10101} ^ 32'h5A3C_96E1;
    return {~v, v};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_read(input logic [2:0] a, output logic [31:0] w);
    @(negedge clk); bus_req.valid = 1'b1; bus_req.addr = a;
    @(negedge clk); bus_req.valid = 1'b0;
    check(bus_rsp.ack, "bus acknowledge");
    w = bus_rsp.data;
  endtask

  task automatic upset(input int a, input logic [71:0] m);
    @(negedge clk); upset_en = 1'b1; upset_addr = 9'(a); upset_mask = m;
    @(negedge clk); upset_en = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, lo, hi;
    int exp_s = 0, exp_d = 0, a;
    bus_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (init_done);
    repeat (600) @(negedge clk);
    bus_read(FM_SBITC, w); check(w == 0, "no SBITERR after fill");
    for (int k = 0; k < 30; k++) begin
      bit dbl;
      a = $urandom_range(0, 511);
      dbl = ($urandom_range(0, 3) == 0);
      upset(a, dbl ? (72'(5) << $urandom_range(0, 60)) : (72'(1) << $urandom_range(0, 71)));
      if (dbl) exp_d++; else exp_s++;
      repeat (1100) @(negedge clk);
      bus_read(FM_SBITC, w); check(w == 32'(exp_s), $sformatf("SBITERR count %0d exp %0d", w, exp_s));
      bus_read(FM_DBITC, w); check(w == 32'(exp_d), $sformatf("DBITERR count %0d exp %0d", w, exp_d));
      bus_read(FM_STATUS, w);
      check(w[31] && w[30] == dbl && w[29] == !dbl && w[8:0] == 9'(a), "status record");
      if (!dbl) begin
        bus_read(FM_DATA_L, lo); bus_read(FM_DATA_H, hi);
        check({hi, lo} == expect_pattern(a), "recorded corrected data");
      end
    end
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    @(negedge clk);
    bus_read(FM_SBITC, w); check(w == 0, "clr clears SBITERR count");
    bus_read(FM_DBITC, w); check(w == 0, "clr clears DBITERR count");
    bus_read(FM_MBUC, w); check(w == 0, "clr clears MBU count");
    // MBU: the window restarts with clr; two single upsets within it
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    upset(100, 72'(1) << 3);
    upset(300, 72'(1) << 50);
    repeat (2200) @(negedge clk);
    bus_read(FM_MBUC, w); check(w == 1, $sformatf("two bits in a window: MBU %0d", w));
    upset(200, 72'(1) << 9);
    repeat (2100) @(negedge clk);
    bus_read(FM_MBUC, w); check(w == 1, $sformatf("one bit in a window: MBU %0d", w));
    upset(400, 72'(3) << 20);
    repeat (2100) @(negedge clk);
    bus_read(FM_MBUC, w); check(w == 2, $sformatf("double-bit error: MBU %0d", w));
    bus_read(FM_SBITC, w); check(w == 3, "three single upsets counted");
    bus_read(FM_DBITC, w); check(w == 1, "one double upset counted");
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    // integrated mode: user reads find a single upset, it is counted once
    standalone = 1'b0;
    @(negedge clk);
    usr_wr_en = 1'b1; usr_wr_addr = 9'd7; usr_wr_data = 64'hDEAD_BEEF_0123_4567;
    @(negedge clk); usr_wr_en = 1'b0;
    upset(7, 72'(1) << 40);
    repeat (3) begin
      @(negedge clk); usr_rd_en = 1'b1; usr_rd_addr = 9'd7;
      @(negedge clk); usr_rd_en = 1'b0;
      check(usr_rd_valid && usr_rd_data == 64'hDEAD_BEEF_0123_4567, "user read corrected");
    end
    repeat (3) @(negedge clk);
    bus_read(FM_SBITC, w); check(w == 1, $sformatf("integrated mode count %0d", w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
