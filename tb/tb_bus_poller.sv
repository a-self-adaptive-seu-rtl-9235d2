// Testbench for bus_poller with four modelled fault detectors. After every
// polling round the counters of the detectors are raised by random amounts;
// the next round must report the sum of all increases, and a round must take
// four clocks per detector. clr restarts the counting from zero.
module tb_bus_poller;
  import seu_pkg::*;
  localparam int N = 4;
  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  fbus_req_t   bus_req [N];
  fbus_rsp_t   bus_rsp [N];
  logic        round_done;
  logic [15:0] new_events;
  logic [15:0] scnt [N], dcnt [N];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  bus_poller #(.N_BFD(N)) dut (.clk, .rst_n, .clr, .bus_req, .bus_rsp, .round_done, .new_events);

  // detector bus slaves: answer one clock after a request
  for (genvar i = 0; i < N; i++) begin : g_slave
    always_ff @(posedge clk) begin
      bus_rsp[i].ack  <= bus_req[i].valid;
      bus_rsp[i].data <= (bus_req[i].addr == FM_SBITC) ? 32'(scnt[i]) :
                         (bus_req[i].addr == FM_DBITC) ? 32'(dcnt[i]) : 32'hDEAD_0000;
    end
  end

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

  initial begin
    int exp_ev, last_t, t;
    for (int i = 0; i < N; i++) begin scnt[i] = 16'(i + 1); dcnt[i] = 16'(i); end
    exp_ev = 1 + 2 + 3 + 4 + 0 + 1 + 2 + 3;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t = 0; last_t = -1;
    for (int r = 0; r < 50; r++) begin
      while (!round_done) begin @(negedge clk); t++; end
      check(new_events == 16'(exp_ev), $sformatf("round %0d events %0d exp %0d", r, new_events, exp_ev));
      if (last_t >= 0) check(t - last_t == 4 * N, $sformatf("round length %0d", t - last_t));
      last_t = t;
      exp_ev = 0;
      for (int i = 0; i < N; i++) begin
        int ds, dd;
        ds = $urandom_range(0, 5); dd = $urandom_range(0, 2);
        scnt[i] += 16'(ds); dcnt[i] += 16'(dd);
        exp_ev += ds + dd;
      end
      @(negedge clk); t++;
    end
    // clear: detectors and poller restart from zero
    clr = 1'b1;
    for (int i = 0; i < N; i++) begin scnt[i] = 0; dcnt[i] = 0; end
    @(negedge clk); clr = 1'b0;
    scnt[2] = 16'd7;
    while (!round_done) @(negedge clk);
    check(new_events == 16'd7, $sformatf("after clear %0d", new_events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
