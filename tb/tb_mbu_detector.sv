// Testbench for mbu_detector: random single- and double-bit error events are
// compared, clock by clock, with a reference that sums bits per fixed window;
// also checks clr restarting the window and saturation of the count.
module tb_mbu_detector;
  localparam int W = 16;
  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0, err_sbit = 1'b0, err_dbit = 1'b0;
  logic [15:0] mbu_cnt;
  int          checks = 0, failures = 0;
  int          ref_cnt = 0, ref_pos = 0, ref_bits = 0;

  always #5 clk = ~clk;

  mbu_detector #(.WINDOW(W), .CNT_W(16)) dut (.clk, .rst_n, .clr, .err_sbit, .err_dbit, .mbu_cnt);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model, updated on the same edge as the design
  always @(posedge clk) if (rst_n) begin
    if (clr) begin
      ref_cnt = 0; ref_pos = 0; ref_bits = 0;
    end else begin
      ref_bits += (err_sbit ? 1 : 0) + (err_dbit ? 2 : 0);
      if (ref_pos == W - 1) begin
        if (ref_bits >= 2 && ref_cnt < 65535) ref_cnt++;
        ref_pos = 0; ref_bits = 0;
      end else ref_pos++;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // sparse events: most windows hold zero or one bit
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      err_sbit = (r < 6);
      err_dbit = (r == 99);
      clr = (i % 5003 == 4000);
      @(negedge clk);
      check(mbu_cnt == 16'(ref_cnt), $sformatf("clock %0d: mbu %0d exp %0d", i, mbu_cnt, ref_cnt));
    end
    err_sbit = 1'b0; err_dbit = 1'b0; clr = 1'b0;
    check(ref_cnt > 20, "some MBUs were seen");
    // a lone bit on the last clock of a window does not count
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    repeat (W - 1) @(negedge clk);
    err_sbit = 1'b1; @(negedge clk); err_sbit = 1'b0;
    repeat (2) @(negedge clk);
    check(mbu_cnt == 0, "single bit at window end");
    // one bit at the start and one at the end of the same window count
    err_sbit = 1'b1; @(negedge clk); err_sbit = 1'b0;
    repeat (W - 4) @(negedge clk);
    err_sbit = 1'b1; @(negedge clk); err_sbit = 1'b0;
    @(negedge clk);
    check(mbu_cnt == 1, $sformatf("bits at both ends of a window: %0d", mbu_cnt));
    // saturation: a double-bit event in every window
    err_dbit = 1'b1;
    repeat (65540 * W) @(negedge clk);
    check(mbu_cnt == 16'hFFFF, "count saturates");
    err_dbit = 1'b0;
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(mbu_cnt == 0, "clr zeroes the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
