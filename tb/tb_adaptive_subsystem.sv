// Testbench for adaptive_subsystem with modelled slot modules and external
// memory (8-word bitstreams). Levels are requested in the order 0 -> 1 -> 2
// -> 0 -> 2; in each configuration the channel outputs must be the results of
// the right channel module or be off; a corrupted replica must raise the DMR
// error (l = 1) or be outvoted and flagged (l = 2). Channel 3 must keep
// running while going from l = 0 to l = 1.
module tb_adaptive_subsystem;
  import seu_pkg::*;
  localparam int DW = 16;
  logic          clk = 1'b0, rst_n = 1'b0;
  level_e        level_req = LVL_NONE, level_active;
  logic          reconf_busy, reconf_done;
  logic [DW-1:0] ch_in_data [3], ch_out_data [3], slot_in_data [3], slot_out_data [3];
  logic          ch_in_valid [3], ch_out_valid [3], slot_in_valid [3], slot_out_valid [3];
  logic          dmr_err;
  logic [15:0]   dmr_err_count;
  logic [2:0]    tmr_mismatch, slot_rst;
  logic          icap_csib, icap_rdwrb, mem_rd_en, mem_rd_valid;
  logic [31:0]   icap_i, mem_addr, mem_rd_data;
  logic [1:0]    slot_chan [3];
  logic [2:0]    corrupt = 3'b000;
  logic [DW-1:0] hist [3][3];      // per channel, inputs of the last clocks
  int            checks = 0, failures = 0;
  int            n_out [3], n_err = 0, n_mm = 0, ch3_busy = 0;

  always #5 clk = ~clk;

  adaptive_subsystem #(.DATA_W(DW), .BS_WORDS(8)) dut (
    .clk, .rst_n, .level_req, .level_active, .reconf_busy, .reconf_done,
    .ch_in_data, .ch_in_valid, .ch_out_data, .ch_out_valid, .dmr_err, .dmr_err_count, .tmr_mismatch,
    .slot_in_data, .slot_in_valid, .slot_out_data, .slot_out_valid, .slot_rst,
    .icap_csib, .icap_rdwrb, .icap_i, .mem_rd_en, .mem_addr, .mem_rd_valid, .mem_rd_data);

  tb_models_ext #(.LATENCY(2)) u_mem (.clk, .rd_en(mem_rd_en), .addr(mem_addr),
                                      .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  // the module loaded in each slot follows the active configuration
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

  // drive new random input every clock and check outputs against the inputs
  // of two clocks before
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 3; c++) begin
        if (ch_out_valid[c]) begin
          n_out[c]++;
          check(ch_out_data[c] == f(c, hist[c][1]), $sformatf("channel %0d output (level %0d)", c + 1, level_active));
        end
        if (reconf_busy && c == 2 && ch_out_valid[2]) ch3_busy++;
      end
      if (dmr_err) n_err++;
      if (tmr_mismatch != 0) n_mm++;
    end
    for (int c = 0; c < 3; c++) begin
      hist[c][2] = hist[c][1];
      hist[c][1] = hist[c][0];
      ch_in_data[c]  = DW'($urandom);
      ch_in_valid[c] = 1'b1;
      hist[c][0] = ch_in_data[c];
    end
  end

  task automatic go_level(input level_e l);
    level_req = l;
    @(negedge clk);
    while (reconf_busy) @(negedge clk);
    check(level_active == l, $sformatf("level %0d active", l));
    repeat (10) @(negedge clk);
  endtask

  task automatic expect_on(input bit c1, input bit c2, input bit c3);
    int b [3];
    for (int c = 0; c < 3; c++) b[c] = n_out[c];
    repeat (50) @(negedge clk);
    check((n_out[0] > b[0]) == c1 && (n_out[1] > b[1]) == c2 && (n_out[2] > b[2]) == c3,
          $sformatf("channels on/off %0d %0d %0d", n_out[0]-b[0], n_out[1]-b[1], n_out[2]-b[2]));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    expect_on(1, 1, 1);
    go_level(LVL_DMR);
    check(ch3_busy > 0, "channel 3 runs during the change to DMR");
    expect_on(1, 0, 1);
    check(n_err == 0, "no DMR error with healthy replicas");
    corrupt[1] = 1'b1;
    repeat (20) @(negedge clk);
    corrupt[1] = 1'b0;
    check(n_err >= 15 && dmr_err_count == 16'(n_err), $sformatf("DMR error detected %0d", n_err));
    go_level(LVL_TMR);
    expect_on(1, 0, 0);
    corrupt[2] = 1'b1;
    repeat (20) @(negedge clk);
    corrupt[2] = 1'b0;
    check(n_mm >= 15, "TMR mismatch flagged, output still correct");
    corrupt[0] = 1'b1;
    repeat (20) @(negedge clk);
    corrupt[0] = 1'b0;
    go_level(LVL_NONE);
    expect_on(1, 1, 1);
    go_level(LVL_TMR);
    expect_on(1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
