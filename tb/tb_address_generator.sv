// Testbench for address_generator: after enable, exactly DEPTH pattern writes
// at addresses 0..DEPTH-1 with the expected pattern, then a wrapping read
// sweep; disable stops it and re-enable restarts the fill.
module tb_address_generator;
  logic        clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic        rd_en, wr_en, init_done;
  logic [8:0]  rd_addr, wr_addr;
  logic [63:0] wr_data;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  address_generator dut (.clk, .rst_n, .enable, .rd_en, .rd_addr, .wr_en, .wr_addr, .wr_data, .init_done);

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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_fill_and_sweep();
    int nw = 0;
    // wait for first write
    while (!wr_en) @(negedge clk);
    while (wr_en) begin
      check(wr_addr == 9'(nw) && wr_data == expect_pattern(nw) && !rd_en,
            $sformatf("fill word %0d addr=%0d", nw, wr_addr));
      nw++;
      @(negedge clk);
    end
    check(nw == 512, $sformatf("fill length %0d", nw));
    for (int i = 0; i < 1100; i++) begin
      check(rd_en && init_done && !wr_en && rd_addr == 9'(i % 512), $sformatf("sweep step %0d", i));
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!rd_en && !wr_en, "idle while disabled");
    enable = 1'b1;
    run_fill_and_sweep();
    enable = 1'b0;
    @(negedge clk);
    repeat (5) begin
      check(!rd_en && !wr_en && !init_done, "stopped when disabled");
      @(negedge clk);
    end
    enable = 1'b1;
    run_fill_and_sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
