// End-to-end testbench for seu_mitigation_top at reduced size: 4 fault
// detectors, 1 tick = 16 clocks, T_TMR = 8 and T_DMR = 32 ticks, 8-word
// bitstreams, 4 clocks per UART bit. Slot modules and the bitstream memory are
// behavioural models.
//
// Story: the sensor BRAMs are filled and swept; upsets are injected into the
// BRAMs at a medium rate (the system must go to DMR), then at a high rate with
// some double upsets (TMR), replicas are corrupted (DMR error, TMR masking),
// the upsets stop (back to no redundancy), a detector is used in integrated
// mode through its user port, and the counters are cleared. Double upsets
// must also show as multiple-bit upsets in the detectors. Every mechanism is
// counted and each must have happened at least once.
module tb_seu_mitigation_top;
  import seu_pkg::*;
  localparam int N = 4, DW = 16, CPB = 4;
  logic          clk = 1'b0, rst_n = 1'b0, standalone_cfg = 1'b1, clear = 1'b0;
  level_e        level, level_active;
  logic [33:0]   sum3;
  logic [15:0]   total_events, dmr_err_count;
  logic          uart_txd, reconf_busy, reconf_done, dmr_err;
  logic [N-1:0]  bfd_init_done, upset_en = '0;
  logic [8:0]    upset_addr = '0;
  logic [71:0]   upset_mask = '0;
  logic          usr_rd_en [N], usr_wr_en [N], usr_wr_ready [N], usr_rd_valid [N];
  logic [8:0]    usr_rd_addr [N], usr_wr_addr [N];
  logic [63:0]   usr_wr_data [N], usr_rd_data [N];
  logic [DW-1:0] ch_in_data [3], ch_out_data [3], slot_in_data [3], slot_out_data [3];
  logic          ch_in_valid [3], ch_out_valid [3], slot_in_valid [3], slot_out_valid [3];
  logic [2:0]    tmr_mismatch, slot_rst;
  logic          icap_csib, icap_rdwrb, mem_rd_en, mem_rd_valid;
  logic [31:0]   icap_i, mem_addr, mem_rd_data;
  logic [1:0]    slot_chan [3];
  logic [2:0]    corrupt = '0;
  logic [DW-1:0] hist [3][2];
  int            checks = 0, failures = 0, injected = 0;
  // mechanism counters
  int n_sbit_inj = 0, n_dbit_inj = 0, n_to_dmr = 0, n_to_tmr = 0, n_to_none = 0;
  int n_reconf = 0, n_icap_sync = 0, n_dmr_err = 0, n_tmr_mask = 0, n_frames = 0;
  int n_user_corr = 0, n_clear = 0, n_ch_out = 0, n_mbu = 0;
  level_e prev_active = LVL_NONE;

  always #5 clk = ~clk;

  seu_mitigation_top #(.N_BFD(N), .TICK_DIV(16), .T_DMR(32), .T_TMR(8), .CLKS_PER_BIT(CPB),
                       .DATA_W(DW), .BS_WORDS(8)) dut (.*);

  tb_models_ext #(.LATENCY(3)) u_mem (.clk, .rd_en(mem_rd_en), .addr(mem_addr),
                                      .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always_comb begin
    slot_chan[0] = 2'd0;
    slot_chan[1] = (level_active == LVL_NONE) ? 2'd1 : 2'd0;
    slot_chan[2] = (level_active == LVL_TMR)  ? 2'd0 : 2'd2;
  end

  for (genvar k = 0; k < 3; k++) begin : g_slot
    tb_models_slot #(.DATA_W(DW)) u_slot (.clk, .rst(!rst_n || slot_rst[k]), .chan(slot_chan[k]),
      .corrupt(corrupt[k]), .x(slot_in_data[k]), .x_valid(slot_in_valid[k]),
      .y(slot_out_data[k]), .y_valid(slot_out_valid[k]));
  end

  function automatic logic [DW-1:0] f(input int c, input logic [DW-1:0] x);
    return x * DW'(2 * c + 3) + DW'(17 * c);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // channel stimulus and output check, level-change and ICAP monitors
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 3; c++)
        if (ch_out_valid[c]) begin
          n_ch_out++;
          check(ch_out_data[c] == f(c, hist[c][1]), $sformatf("channel %0d data", c + 1));
        end
      if (dmr_err) n_dmr_err++;
      if (tmr_mismatch != 0 && ch_out_valid[0]) n_tmr_mask++;
      if (reconf_done) n_reconf++;
      if (level_active != prev_active) begin
        if (level_active == LVL_DMR)  n_to_dmr++;
        if (level_active == LVL_TMR)  n_to_tmr++;
        if (level_active == LVL_NONE) n_to_none++;
        prev_active = level_active;
      end
      if (!icap_csib && icap_i == 32'hAA99_5566) n_icap_sync++;
    end
    for (int c = 0; c < 3; c++) begin
      hist[c][1] = hist[c][0];
      ch_in_data[c]  = DW'($urandom);
      ch_in_valid[c] = 1'b1;
      hist[c][0] = ch_in_data[c];
    end
  end

  // UART frame receiver
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
      if (nb == 0) check(b == 8'hA5, "frame header");
      nb = (nb + 1) % 4;
      if (nb == 0) n_frames++;
    end
  end

  task automatic upset(input bit dbl);
    int i, a, bit0;
    // a fresh word each time: two upsets in one word within a sweep would be
    // one multi-bit upset, not two events
    i = injected % N;
    a = (injected * 97 + 13) % 512;
    bit0 = $urandom_range(0, 69);
    @(negedge clk);
    upset_en = '0; upset_en[i] = 1'b1; upset_addr = 9'(a);
    upset_mask = dbl ? (72'(3) << bit0) : (72'(1) << bit0);
    @(negedge clk);
    upset_en = '0;
    injected++;
    if (dbl) n_dbit_inj++; else n_sbit_inj++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      usr_rd_en[i] = 1'b0; usr_wr_en[i] = 1'b0; usr_rd_addr[i] = '0; usr_wr_addr[i] = '0;
      usr_wr_data[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&bfd_init_done);
    repeat (1200) @(negedge clk);
    check(total_events == 0 && level == LVL_NONE, "clean sensor: no events, level 0");
    // medium rate: one upset every 20 ticks -> sum ~60 ticks -> DMR
    for (int k = 0; k < 6; k++) begin
      upset(1'b0);
      repeat (20 * 16 - 2) @(negedge clk);
    end
    check(level == LVL_DMR, $sformatf("medium rate gives DMR (sum %0d)", sum3));
    while (reconf_busy || level_active != LVL_DMR) @(negedge clk);
    repeat (20) @(negedge clk);
    corrupt[1] = 1'b1;
    repeat (10) @(negedge clk);
    corrupt[1] = 1'b0;
    // high rate with double upsets: one every 2 ticks -> TMR
    for (int k = 0; k < 40; k++) begin
      upset(k % 5 == 0);
      repeat (2 * 16 - 2) @(negedge clk);
      if (k == 30) corrupt[2] = 1'b1;
    end
    corrupt[2] = 1'b0;
    check(level == LVL_TMR, $sformatf("high rate gives TMR (sum %0d)", sum3));
    repeat (2000) @(negedge clk);
    check(total_events == 16'(injected), $sformatf("events counted %0d of %0d", total_events, injected));
    // upsets stop: estimate decays, level returns to 0
    repeat (3000) @(negedge clk);
    while (reconf_busy) @(negedge clk);
    check(level == LVL_NONE && level_active == LVL_NONE, "quiet again: level 0");
    // integrated mode: detector 2 used as user memory
    standalone_cfg = 1'b0;
    repeat (3) @(negedge clk);
    usr_wr_en[2] = 1'b1; usr_wr_addr[2] = 9'd100; usr_wr_data[2] = 64'h0123_4567_89AB_CDEF;
    @(negedge clk); usr_wr_en[2] = 1'b0;
    @(negedge clk); upset_en[2] = 1'b1; upset_addr = 9'd100; upset_mask = 72'(1) << 33;
    @(negedge clk); upset_en = '0; injected++;
    usr_rd_en[2] = 1'b1; usr_rd_addr[2] = 9'd100;
    @(negedge clk); usr_rd_en[2] = 1'b0;
    if (usr_rd_valid[2] && usr_rd_data[2] == 64'h0123_4567_89AB_CDEF) n_user_corr++;
    repeat (200) @(negedge clk);
    check(total_events == 16'(injected), "user-mode upset counted");
    // multiple-bit upsets seen by the detectors (windows of one tick here)
    n_mbu = int'(dut.g_bfd[0].u_bfd.u_mbu.mbu_cnt) + int'(dut.g_bfd[1].u_bfd.u_mbu.mbu_cnt)
          + int'(dut.g_bfd[2].u_bfd.u_mbu.mbu_cnt) + int'(dut.g_bfd[3].u_bfd.u_mbu.mbu_cnt);
    check(n_mbu >= n_dbit_inj && n_mbu <= n_dbit_inj + n_sbit_inj / 2,
          $sformatf("MBU count %0d for %0d double upsets", n_mbu, n_dbit_inj));
    // clear
    clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    repeat (100) @(negedge clk);
    if (total_events == 0) n_clear++;
    repeat (400) @(negedge clk);
    $display("mechanisms: sbit_inj=%0d dbit_inj=%0d to_dmr=%0d to_tmr=%0d to_none=%0d reconf=%0d icap_sync=%0d dmr_err=%0d tmr_mask=%0d frames=%0d user_corr=%0d clear=%0d ch_out=%0d mbu=%0d",
             n_sbit_inj, n_dbit_inj, n_to_dmr, n_to_tmr, n_to_none, n_reconf, n_icap_sync,
             n_dmr_err, n_tmr_mask, n_frames, n_user_corr, n_clear, n_ch_out, n_mbu);
    check(n_sbit_inj > 0, "single upsets");
    check(n_dbit_inj > 0, "double upsets");
    check(n_to_dmr > 0, "switch to DMR");
    check(n_to_tmr > 0, "switch to TMR");
    check(n_to_none > 0, "switch back to no redundancy");
    check(n_reconf >= 3 && n_icap_sync == n_reconf, "reconfigurations through ICAP");
    check(n_dmr_err > 0, "DMR error detected");
    check(n_tmr_mask > 0, "TMR masked a replica");
    check(n_frames > 0, "UART reports");
    check(n_user_corr > 0, "integrated-mode correction");
    check(n_clear > 0, "clear");
    check(n_ch_out > 0, "channel data");
    check(n_mbu > 0, "multiple-bit upsets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
