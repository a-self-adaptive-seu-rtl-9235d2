// Testbench for error_detector: err exactly when both replicas are valid and
// differ, the output is replica a, and mismatches are counted (saturating
// counter cleared by clr).
module tb_error_detector;
  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [15:0] a = '0, b = '0, y;
  logic        a_valid = 1'b0, b_valid = 1'b0, y_valid, err;
  logic [15:0] err_count;
  int          checks = 0, failures = 0, ref_cnt = 0;

  always #5 clk = ~clk;

  error_detector dut (.clk, .rst_n, .clr, .a, .a_valid, .b, .b_valid, .y, .y_valid, .err, .err_count);

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
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      bit e;
      a = 16'($urandom);
      b = ($urandom_range(0, 2) == 0) ? a ^ (16'(1) << $urandom_range(0, 15)) : a;
      a_valid = ($urandom_range(0, 4) != 0);
      b_valid = ($urandom_range(0, 4) != 0);
      e = a_valid && b_valid && (a != b);
      #1;
      check(err == e && y == a && y_valid == a_valid, "err and output");
      @(negedge clk);
      if (e) ref_cnt++;
      check(err_count == 16'(ref_cnt), $sformatf("count %0d exp %0d", err_count, ref_cnt));
    end
    clr = 1'b1; a_valid = 1'b0;
    @(negedge clk);
    check(err_count == 0, "clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
