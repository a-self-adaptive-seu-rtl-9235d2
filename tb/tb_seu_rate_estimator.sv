// Testbench for seu_rate_estimator (1 tick = 4 clocks): tick period; before
// any event the sum is at its maximum; events every 10 ticks give a sum of
// about 30 ticks (one tick of quantisation per interval); a burst of events reported together gives a sum near 0;
// when events stop, the sum grows with the open interval.
module tb_seu_rate_estimator;
  localparam int IW = 16;
  logic            clk = 1'b0, rst_n = 1'b0, ev_valid = 1'b0, tick;
  logic [15:0]     ev_count = '0;
  logic [IW+1:0]   sum3;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  seu_rate_estimator #(.TICK_DIV(4), .IW(IW)) dut (.clk, .rst_n, .ev_valid, .ev_count, .sum3, .tick);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic event_n(input int n);
    @(negedge clk); ev_valid = 1'b1; ev_count = 16'(n);
    @(negedge clk); ev_valid = 1'b0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nt, s_prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // tick period
    while (!tick) @(negedge clk);
    nt = 0;
    for (int i = 0; i < 40; i++) begin @(negedge clk); if (tick) nt++; end
    check(nt == 10, $sformatf("tick every 4 clocks (%0d in 40)", nt));
    check(sum3 >= (IW+2)'(3 * 65535 - 100), "no event yet: lowest rate");
    // regular events every 10 ticks
    for (int k = 0; k < 6; k++) begin
      repeat (40 - 2) @(negedge clk);
      event_n(1);
    end
    repeat (4) @(negedge clk);
    check(sum3 >= 27 && sum3 <= 33, $sformatf("sum of three 10-tick intervals = %0d", sum3));
    // faster events every 2 ticks
    for (int k = 0; k < 4; k++) begin
      repeat (8 - 2) @(negedge clk);
      event_n(1);
    end
    repeat (2) @(negedge clk);
    check(sum3 >= 3 && sum3 <= 9, $sformatf("sum of three 2-tick intervals = %0d", sum3));
    // burst: four events in one report (the first closes the long interval)
    repeat (200) @(negedge clk);
    event_n(4);
    repeat (5) @(negedge clk);
    check(sum3 <= 2, $sformatf("burst gives near-zero sum = %0d", sum3));
    // silence: the open interval takes over
    s_prev = int'(sum3);
    repeat (400) @(negedge clk);
    check(int'(sum3) >= 99 && int'(sum3) > s_prev, $sformatf("sum grows when upsets stop = %0d", sum3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
