// Testbench for channel_mux: for each level and random channel data, every
// slot must carry the channel given by the configuration table.
module tb_channel_mux;
  import seu_pkg::*;
  level_e      mode;
  logic [15:0] ch_data [3], slot_data [3];
  logic        ch_valid [3], slot_valid [3];
  int          checks = 0, failures = 0;

  channel_mux dut (.mode, .ch_data, .ch_valid, .slot_data, .slot_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // source channel of each slot, per level
    int src [3][3] = '{'{0, 1, 2}, '{0, 0, 2}, '{0, 0, 0}};
    for (int n = 0; n < 300; n++) begin
      int l;
      l = n % 3;
      mode = level_e'(l);
      for (int c = 0; c < 3; c++) begin
        ch_data[c]  = 16'($urandom);
        ch_valid[c] = 1'($urandom_range(0, 1));
      end
      #1;
      for (int s = 0; s < 3; s++)
        check(slot_data[s] == ch_data[src[l][s]] && slot_valid[s] == ch_valid[src[l][s]],
              $sformatf("level %0d slot %0d", l, s + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
