// Testbench for err_counter: random increments against a reference count,
// clear priority, and saturation at all ones (WIDTH reduced to 4 for that).
module tb_err_counter;
  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0, inc = 1'b0;
  logic [15:0] count;
  logic        clr4 = 1'b0, inc4 = 1'b0;
  logic [3:0]  count4;
  int          checks = 0, failures = 0;
  int          ref_cnt = 0;

  always #5 clk = ~clk;

  err_counter dut (.clk, .rst_n, .clr, .inc, .count);
  err_counter #(.WIDTH(4)) dut4 (.clk, .rst_n, .clr(clr4), .inc(inc4), .count(count4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
    check(count == 0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      inc = 1'($urandom_range(0, 1));
      clr = ($urandom_range(0, 99) == 0);
      @(negedge clk);
      if (clr) ref_cnt = 0; else if (inc) ref_cnt++;
      check(count == 16'(ref_cnt), $sformatf("count %0d expected %0d", count, ref_cnt));
    end
    inc = 1'b0; clr = 1'b0;
    inc4 = 1'b1;
    repeat (20) @(negedge clk);
    check(count4 == 4'hF, "saturates at all ones");
    clr4 = 1'b1;
    @(negedge clk);
    check(count4 == 0, "clear wins over increment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
