// Full-size testbench for seu_mitigation_top with every parameter at its
// default: 64 fault detectors of 512 x 72 bits, 1 s ticks at 100 MHz, 65536-word
// bitstreams, 115200 baud. One complete operation: fill and sweep all sensor
// BRAMs, a burst of four upsets in four detectors within one second (a mean
// time to upset far below the TMR threshold), detection and counting by the
// polling FMU, the decision for TMR, the partial reconfiguration through the
// ICAP, and channel 1 running triplicated behind the voter. It also checks
// that the decision follows the last upset within two polling rounds (2 x 256
// clocks plus pipeline) and that a UART report with header A5 goes out.
module tb_seu_mitigation_top_full;
  import seu_pkg::*;
  localparam int N = 64, DW = 16;
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
  logic [DW-1:0] hist [3][2];
  logic [7:0]    rx_bytes [$];
  int            checks = 0, failures = 0, n_icap = 0, n_ch1 = 0, cyc = 0;

  always #5 clk = ~clk;

  seu_mitigation_top dut (.*);

  tb_models_ext #(.LATENCY(3)) u_mem (.clk, .rd_en(mem_rd_en), .addr(mem_addr),
                                      .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always_comb begin
    slot_chan[0] = 2'd0;
    slot_chan[1] = (level_active == LVL_NONE) ? 2'd1 : 2'd0;
    slot_chan[2] = (level_active == LVL_TMR)  ? 2'd0 : 2'd2;
  end

  for (genvar k = 0; k < 3; k++) begin : g_slot
    tb_models_slot #(.DATA_W(DW)) u_slot (.clk, .rst(!rst_n || slot_rst[k]), .chan(slot_chan[k]),
      .corrupt(1'b0), .x(slot_in_data[k]), .x_valid(slot_in_valid[k]),
      .y(slot_out_data[k]), .y_valid(slot_out_valid[k]));
  end

  function automatic logic [DW-1:0] f(input int c, input logic [DW-1:0] x);
    return x * DW'(2 * c + 3) + DW'(17 * c);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int c = 0; c < 3; c++)
        if (ch_out_valid[c])
          check(ch_out_data[c] == f(c, hist[c][1]), $sformatf("channel %0d data", c + 1));
      if (ch_out_valid[0] && level_active == LVL_TMR) n_ch1++;
      if (!icap_csib) n_icap++;
    end
    for (int c = 0; c < 3; c++) begin
      hist[c][1] = hist[c][0];
      ch_in_data[c]  = DW'($urandom);
      ch_in_valid[c] = 1'b1;
      hist[c][0] = ch_in_data[c];
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // UART receiver, 868 clocks per bit
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (434) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (868) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (868) @(posedge clk);
      rx_bytes.push_back(b);
    end
  end

  initial begin
    int t_last, t_tmr;
    for (int i = 0; i < N; i++) begin
      usr_rd_en[i] = 1'b0; usr_wr_en[i] = 1'b0; usr_rd_addr[i] = '0; usr_wr_addr[i] = '0;
      usr_wr_data[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&bfd_init_done);
    repeat (1100) @(negedge clk);
    check(total_events == 0 && level == LVL_NONE && level_active == LVL_NONE, "clean start");
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      upset_en = '0; upset_en[k * 16 + 3] = 1'b1; upset_addr = 9'(100 + 50 * k);
      upset_mask = 72'(1) << (k * 17);
      @(negedge clk);
      upset_en = '0;
      repeat (100) @(negedge clk);
    end
    t_last = cyc;
    while (level != LVL_TMR && cyc - t_last < 5000) @(negedge clk);
    t_tmr = cyc;
    check(level == LVL_TMR, "burst of upsets: TMR requested");
    check(t_tmr - t_last <= 2 * 256 + 512 + 16, $sformatf("decision %0d clocks after the last upset", t_tmr - t_last));
    check(total_events == 4, $sformatf("four events counted (%0d)", total_events));
    repeat (2) @(negedge clk);
    check(reconf_busy, "reconfiguration running");
    while (reconf_busy) @(negedge clk);
    check(level_active == LVL_TMR, "TMR configuration active");
    check(n_icap == 13 + 65536 + 4, $sformatf("ICAP words %0d", n_icap));
    repeat (100) @(negedge clk);
    check(n_ch1 > 50 && !ch_out_valid[1] && !ch_out_valid[2], "channel 1 voted, channels 2 and 3 off");
    // first UART frame byte is the header
    while (rx_bytes.size() == 0) @(negedge clk);
    check(rx_bytes[0] == 8'hA5, $sformatf("UART header %h", rx_bytes[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
