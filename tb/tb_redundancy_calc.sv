// Testbench for redundancy_calc at its default thresholds: the level must
// switch exactly at three times the mean-time thresholds 11712 s (TMR) and
// 45532 s (DMR), with one clock of latency, and follow random sums.
module tb_redundancy_calc;
  import seu_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [33:0] sum3 = '1;
  level_e      level;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  redundancy_calc dut (.clk, .rst_n, .sum3, .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic level_e expected(input longint s);
    if (s <= 35136) return LVL_TMR;       // 3 * 11712
    if (s <= 136596) return LVL_DMR;      // 3 * 45532
    return LVL_NONE;
  endfunction

  task automatic apply(input longint s);
    @(negedge clk); sum3 = 34'(s);
    @(negedge clk);
    check(level == expected(s), $sformatf("sum %0d -> level %0d", s, level));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(level == LVL_NONE, "reset level 0");
    rst_n = 1'b1;
    apply(0); apply(35135); apply(35136); apply(35137); apply(136595); apply(136596);
    apply(136597); apply(64'h3_FFFF_FFFF);
    for (int i = 0; i < 500; i++) apply(longint'($urandom_range(0, 200000)));
    // latency: a change is visible one clock later, not in the same clock
    @(negedge clk); sum3 = 34'd10;
    @(negedge clk); check(level == LVL_TMR, "TMR after one clock");
    sum3 = 34'd1_000_000;
    #1; check(level == LVL_TMR, "no combinational path");
    @(negedge clk); check(level == LVL_NONE, "back to none");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
