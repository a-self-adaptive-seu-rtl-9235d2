// Testbench for reconfig_control_unit with a 16-word bitstream per level and
// a modelled external memory (latency 3). For each level change the words on
// the ICAP must be: the 13 header words in consecutive clocks (with the frame
// address and word count), the 16 words of that level's bitstream in order,
// and the 4 trailer words; level_active changes only after that, with a done
// pulse. A request that changes during a reconfiguration is served afterwards.
module tb_reconfig_control_unit;
  import seu_pkg::*;
  localparam int          BSW = 16;
  localparam logic [31:0] FAR = 32'h0040_1234;
  logic        clk = 1'b0, rst_n = 1'b0;
  level_e      level_req = LVL_NONE, level_active, level_target;
  logic        busy, done, icap_csib, icap_rdwrb, mem_rd_en, mem_rd_valid;
  logic [31:0] icap_i, mem_addr, mem_rd_data;
  int          checks = 0, failures = 0;
  logic [31:0] icap_words [$];
  int          icap_cycle [$];
  int          cyc = 0;

  always #5 clk = ~clk;

  reconfig_control_unit #(.BS_WORDS(BSW), .FAR_ADDR(FAR)) dut (
    .clk, .rst_n, .level_req, .level_active, .level_target, .busy, .done,
    .icap_csib, .icap_rdwrb, .icap_i, .mem_rd_en, .mem_addr, .mem_rd_valid, .mem_rd_data);

  tb_models_ext #(.LATENCY(3)) u_mem (.clk, .rd_en(mem_rd_en), .addr(mem_addr),
                                      .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always @(posedge clk) begin
    cyc++;
    if (rst_n && !icap_csib) begin
      icap_words.push_back(icap_i);
      icap_cycle.push_back(cyc);
      if (icap_rdwrb) begin failures++; $display("FAIL: ICAP read"); end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] mem_word(input int a);
    return 32'(a) * 32'h9E37_79B1 + 32'h0123_4567;
  endfunction

  task automatic expect_stream(input int lvl);
    logic [31:0] hdr [13];
    logic [31:0] trl [4];
    hdr = '{32'hFFFF_FFFF, 32'hAA99_5566, 32'h2000_0000, 32'h3000_8001, 32'h0000_0007,
            32'h2000_0000, 32'h3000_2001, FAR, 32'h3000_8001, 32'h0000_0001,
            32'h2000_0000, 32'h3000_4000, 32'h5000_0000 + BSW};
    trl = '{32'h3000_8001, 32'h0000_000D, 32'h2000_0000, 32'h2000_0000};
    check(icap_words.size() == 13 + BSW + 4, $sformatf("stream length %0d", icap_words.size()));
    if (icap_words.size() != 13 + BSW + 4) return;
    for (int i = 0; i < 13; i++) begin
      check(icap_words[i] == hdr[i], $sformatf("header word %0d = %h", i, icap_words[i]));
      if (i > 0) check(icap_cycle[i] == icap_cycle[i-1] + 1, "header at one word per clock");
    end
    for (int i = 0; i < BSW; i++)
      check(icap_words[13 + i] == mem_word(lvl * BSW + i), $sformatf("data word %0d", i));
    for (int i = 0; i < 4; i++)
      check(icap_words[13 + BSW + i] == trl[i], $sformatf("trailer word %0d", i));
    icap_words.delete();
    icap_cycle.delete();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    level_e seq [4] = '{LVL_DMR, LVL_TMR, LVL_NONE, LVL_TMR};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!busy && level_active == LVL_NONE && icap_words.size() == 0, "idle at level 0");
    foreach (seq[k]) begin
      int ndone;
      ndone = 0;
      level_req = seq[k];
      @(negedge clk);
      check(busy, "busy after request");
      while (busy) begin
        if (level_active != seq[k] && k > 0) check(level_active == seq[k-1], "old level while busy");
        @(negedge clk);
        if (done) ndone++;
      end
      check(ndone == 1, $sformatf("one done pulse (%0d)", ndone));
      check(level_active == seq[k], $sformatf("active level %0d", level_active));
      expect_stream(int'(seq[k]));
      repeat (5) @(negedge clk);
    end
    // change of request in the middle of a reconfiguration
    level_req = LVL_DMR;
    repeat (20) @(negedge clk);
    level_req = LVL_NONE;
    while (busy) @(negedge clk);
    check(level_active == LVL_DMR, "first reconfiguration completes");
    @(negedge clk);
    check(busy && level_target == LVL_NONE, "second reconfiguration starts");
    while (busy) @(negedge clk);
    check(level_active == LVL_NONE, "ends at latest request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
