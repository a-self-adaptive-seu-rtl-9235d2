// Workload testbench: the fault management unit at its default size (64
// detectors) and default thresholds, fed with upsets at the mean rate of a
// 64-BRAM sensor for each solar condition in geostationary orbit behind
// 4.5 mm of aluminium, plus one rate between the DMR and TMR limits.
// Mean times between upsets: Solar Minimum 101,420 s, Worst Week 901 s,
// Peak 5 Minutes 59.5 s (from the tabulated 64-BRAM rates 9.86e-6, 1.11e-3,
// 1.68e-2 /s), Worst Day 219 s and Solar Maximum 323,400 s (device rates
// 2.13e-2 and 1.44e-5 /s scaled by 64/298), and 20,000 s in between.
// The expected levels are those the configuration-memory rate of each
// condition falls into: none for both solar minimum and maximum, TMR for
// Worst Week, Worst Day and Peak 5 Minutes, DMR for the intermediate rate.
// To keep the run short, one tick (one second in hardware) is 16 clocks
// here; one polling round of 64 detectors is 256 clocks = 16 ticks, so each
// measured interval may be off by up to one round. After a first upset that
// starts the measurement, upsets come at exactly
// the mean time, spread over the 64 modelled detectors; after three upsets
// of a condition the estimate (sum3) holds only its intervals, and both
// sum3 and the level are checked after the third and the fourth. Last, a
// Peak 5 Minutes burst straight after Solar Maximum must bring TMR within
// the 300 s the peak lasts.
module tb_fmu_solar_conditions;
  import seu_pkg::*;
  localparam int N = 64, TD = 16;
  logic        clk = 1'b0, rst_n = 1'b0, standalone_cfg = 1'b1, clear = 1'b0;
  logic        bfd_standalone, bfd_clr, uart_txd;
  fbus_req_t   bus_req [N];
  fbus_rsp_t   bus_rsp [N];
  level_e      level;
  logic [33:0] sum3;
  logic [15:0] total_events;
  logic [15:0] scnt [N];
  int          checks = 0, failures = 0, injected = 0;
  int          seen [3];

  always #5 clk = ~clk;

  fault_management_unit #(.TICK_DIV(TD)) dut (
    .clk, .rst_n, .standalone_cfg, .clear, .bfd_standalone, .bfd_clr, .bus_req, .bus_rsp,
    .level, .sum3, .total_events, .uart_txd);

  for (genvar i = 0; i < N; i++) begin : g_slave
    always_ff @(posedge clk) begin
      bus_rsp[i].ack  <= bus_req[i].valid;
      bus_rsp[i].data <= (bus_req[i].addr == FM_SBITC) ? 32'(scnt[i]) : 32'd0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // four upsets at mean time mt (seconds = ticks); checks after the 3rd and 4th
  task automatic condition(input string name, input int mt, input level_e exp);
    for (int k = 0; k < 4; k++) begin
      repeat (mt * TD - 3 * N * 4) @(negedge clk);
      scnt[(injected * 5) % N]++;
      injected++;
      repeat (3 * N * 4) @(negedge clk);   // three polling rounds
      if (k >= 2) begin
        int s;
        s = int'(sum3);
        check(s >= 3 * mt - 2 * 16 && s <= 3 * mt + 2 * 16,
              $sformatf("%s: sum3 %0d for 3 x %0d s", name, s, mt));
        check(level == exp, $sformatf("%s: level %0d, expected %0d", name, level, exp));
        if (level == exp) seen[exp]++;
      end
    end
    $display("%s: mean time %0d s, sum3 %0d, level %0d", name, mt, sum3, level);
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) scnt[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10 * N * 4) @(negedge clk);
    check(level == LVL_NONE, "no redundancy at start");
    // first upset: starts the first measured interval
    scnt[0]++;
    injected++;
    repeat (3 * N * 4) @(negedge clk);
    condition("Solar Minimum", 101_420, LVL_NONE);
    condition("between the limits", 20_000, LVL_DMR);
    condition("Worst Week", 901, LVL_TMR);
    condition("Worst Day", 219, LVL_TMR);
    condition("Peak 5 Minutes", 60, LVL_TMR);
    condition("Solar Maximum", 323_400, LVL_NONE);
    // a Peak 5 Minutes burst after a quiet period: TMR must be requested
    // within the 300 s that the peak lasts (onset = one mean time before
    // its first upset)
    begin
      int t;
      repeat (100_000 * TD) @(negedge clk);   // quiet: no upset for 100,000 s
      t = 0;
      while (level != LVL_TMR && t < 300 * TD) begin
        if (t % (60 * TD) == 60 * TD - 1) begin
          scnt[(injected * 5) % N]++;
          injected++;
        end
        @(negedge clk);
        t++;
      end
      check(level == LVL_TMR, $sformatf("TMR within the 300 s peak (after %0d s)", t / TD));
      $display("Peak 5 Minutes after quiet: TMR after %0d s", t / TD);
      repeat (3 * N * 4) @(negedge clk);
    end
    check(total_events == 16'(injected), "every upset counted");
    for (int l = 0; l < 3; l++) check(seen[l] > 0, $sformatf("level %0d reached", l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
