// Testbench for bus_access_control: a request is acknowledged in the next
// clock with the fault-memory word of the requested address; no request, no
// acknowledge.
module tb_bus_access_control;
  import seu_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  fbus_req_t   req;
  fbus_rsp_t   rsp;
  logic [2:0]  fm_addr;
  logic [31:0] fm_data;
  logic [31:0] words [8];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign fm_data = words[fm_addr];

  bus_access_control dut (.clk, .rst_n, .req, .rsp, .fm_addr, .fm_data);

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
    req = '0;
    for (int i = 0; i < 8; i++) words[i] = $urandom();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      logic        v;
      logic [2:0]  a;
      logic [31:0] expw;
      v = 1'($urandom_range(0, 1));
      a = 3'($urandom);
      req.valid = v; req.addr = a;
      expw = words[a];
      @(negedge clk);
      req.valid = 1'b0;
      words[a] = $urandom();   // the word changes after it was sampled
      check(rsp.ack == v, "ack follows request by one clock");
      if (v) check(rsp.data == expw, "data of requested word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
