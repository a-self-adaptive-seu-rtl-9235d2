// Testbench for fault_management_unit with four modelled fault detectors,
// 1 tick = 4 clocks, thresholds T_TMR = 10 and T_DMR = 40 ticks. Upsets are
// raised in the modelled counters at different rates: rare (level 0), medium
// (DMR), frequent (TMR), then none (falls back to 0). The UART frames are
// decoded and must carry header A5, the current level and the event total.
// Control: standalone_cfg and clear reach the detectors one clock later.
module tb_fault_management_unit;
  import seu_pkg::*;
  localparam int N = 4, CPB = 4;
  logic        clk = 1'b0, rst_n = 1'b0, standalone_cfg = 1'b1, clear = 1'b0;
  logic        bfd_standalone, bfd_clr, uart_txd;
  fbus_req_t   bus_req [N];
  fbus_rsp_t   bus_rsp [N];
  level_e      level;
  logic [33:0] sum3;
  logic [15:0] total_events;
  logic [15:0] scnt [N], dcnt [N];
  int          checks = 0, failures = 0, injected = 0, frames = 0;
  logic [7:0]  rx [4];
  int          seen_level [3];

  always #5 clk = ~clk;

  fault_management_unit #(.N_BFD(N), .TICK_DIV(4), .IW(32), .T_DMR(40), .T_TMR(10),
                          .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .standalone_cfg, .clear, .bfd_standalone, .bfd_clr, .bus_req, .bus_rsp,
    .level, .sum3, .total_events, .uart_txd);

  for (genvar i = 0; i < N; i++) begin : g_slave
    always_ff @(posedge clk) begin
      bus_rsp[i].ack  <= bus_req[i].valid;
      bus_rsp[i].data <= (bus_req[i].addr == FM_SBITC) ? 32'(scnt[i]) :
                         (bus_req[i].addr == FM_DBITC) ? 32'(dcnt[i]) : 32'd0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // UART receiver: collects 4-byte frames
  initial begin
    logic [7:0] b;
    int nb = 0;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      rx[nb] = b;
      nb++;
      if (nb == 4) begin
        nb = 0;
        frames++;
        check(rx[0] == 8'hA5, "frame header");
        check(rx[1] <= 8'd2, "level byte");
        check({rx[2], rx[3]} <= 16'(injected), "event total not above injected");
        seen_level[rx[1]]++;
      end
    end
  end

  task automatic inject_every(input int clocks, input int n);
    for (int k = 0; k < n; k++) begin
      repeat (clocks) @(negedge clk);
      if ($urandom_range(0, 3) == 0) dcnt[k % N]++; else scnt[k % N]++;
      injected++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin scnt[i] = 0; dcnt[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) @(negedge clk);
    check(level == LVL_NONE, "no upsets: level 0");
    inject_every(1000, 4);      // 250 ticks apart
    repeat (50) @(negedge clk);
    check(level == LVL_NONE, $sformatf("rare upsets: level 0 (sum %0d)", sum3));
    inject_every(80, 5);        // 20 ticks apart: sum ~60
    repeat (50) @(negedge clk);
    check(level == LVL_DMR, $sformatf("medium rate: DMR (sum %0d)", sum3));
    inject_every(8, 0);
    inject_every(12, 40);       // 3 ticks apart, polled every 4 ticks: sum small
    repeat (50) @(negedge clk);
    check(level == LVL_TMR, $sformatf("high rate: TMR (sum %0d)", sum3));
    check(total_events == 16'(injected), $sformatf("total events %0d of %0d", total_events, injected));
    repeat (1000) @(negedge clk);
    check(level == LVL_NONE, $sformatf("upsets stopped: back to 0 (sum %0d)", sum3));
    repeat (200) @(negedge clk);
    check(frames >= 3 && seen_level[1] > 0 && seen_level[2] > 0, $sformatf("UART frames %0d", frames));
    // reset & control
    @(negedge clk); standalone_cfg = 1'b0;
    @(negedge clk); check(!bfd_standalone, "mode to detectors");
    clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(bfd_clr, "clear to detectors");
    @(negedge clk);
    check(total_events == 0, "clear resets total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
