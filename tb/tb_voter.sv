// Testbench for voter: one corrupted replica (any bits) is always outvoted
// and flagged in mismatch; valid needs all three replicas valid; exhaustive
// check of the bit majority on 4-bit words.
module tb_voter;
  logic [15:0] d [3], y;
  logic        d_valid [3], y_valid;
  logic [2:0]  mismatch;
  logic [3:0]  e [3], ey;
  logic        ev [3], eyv;
  logic [2:0]  emm;
  int          checks = 0, failures = 0;

  voter dut (.d, .d_valid, .y, .y_valid, .mismatch);
  voter #(.DATA_W(4)) dut4 (.d(e), .d_valid(ev), .y(ey), .y_valid(eyv), .mismatch(emm));

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
    for (int n = 0; n < 500; n++) begin
      logic [15:0] good;
      int bad;
      good = 16'($urandom);
      bad = $urandom_range(0, 3);     // 3: no corrupted replica
      for (int k = 0; k < 3; k++) begin
        d[k] = good;
        d_valid[k] = 1'b1;
      end
      if (bad < 3) d[bad] = good ^ 16'($urandom_range(1, 65535));
      #1;
      check(y == good && y_valid, "single corrupted replica outvoted");
      for (int k = 0; k < 3; k++) check(mismatch[k] == (k == bad), "mismatch flag");
      d_valid[$urandom_range(0, 2)] = 1'b0;
      #1;
      check(!y_valid, "needs all three valid");
    end
    for (int v = 0; v < 4096; v++) begin
      e[0] = v[3:0]; e[1] = v[7:4]; e[2] = v[11:8];
      ev[0] = 1'b1; ev[1] = 1'b1; ev[2] = 1'b1;
      #1;
      for (int b = 0; b < 4; b++)
        check(ey[b] == ((int'(e[0][b]) + int'(e[1][b]) + int'(e[2][b])) >= 2), "bit majority");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
