// Testbench for uart_tx (8 clocks per bit): a receiver in the testbench
// samples the line in the middle of each bit and must get back every byte
// with a low start bit and a high stop bit; a frame keeps tx_ready low for
// exactly 10 bit times.
module tb_uart_tx;
  localparam int CPB = 8;
  logic       clk = 1'b0, rst_n = 1'b0, tx_valid = 1'b0, tx_ready, tx;
  logic [7:0] tx_data = '0;
  int         checks = 0, failures = 0;
  logic [7:0] sent [$];

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .tx_valid, .tx_data, .tx_ready, .tx);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      check(tx == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      check(tx == 1'b1, "stop bit");
      check(sent.size() > 0 && b == sent[0], $sformatf("received %h", b));
      if (sent.size() > 0) void'(sent.pop_front());
    end
  end

  initial begin
    int busy;
    repeat (2) @(negedge clk);
    check(tx == 1'b1, "line idles high");
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      tx_valid = 1'b1; tx_data = 8'($urandom);
      sent.push_back(tx_data);
      @(negedge clk);
      tx_valid = 1'b0;
      busy = 0;
      while (!tx_ready) begin @(negedge clk); busy++; end
      check(busy == 10 * CPB, $sformatf("frame length %0d", busy));
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    repeat (3 * CPB) @(negedge clk);
    check(sent.size() == 0, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
