// Testbench for ecc_bram: writes random words, reads them back one clock
// later, and then flips every one of the 72 stored bits in turn (single
// upsets: corrected data, SBITERR) and random bit pairs (DBITERR).
module tb_ecc_bram;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        wden = 1'b0, rden = 1'b0, upset_en = 1'b0;
  logic [8:0]  wraddr = '0, rdaddr = '0, upset_addr = '0;
  logic [63:0] di = '0, dout;
  logic [7:0]  ecc;
  logic        sbiterr, dbiterr;
  logic [71:0] upset_mask = '0;
  int          checks = 0, failures = 0;
  logic [63:0] ref_mem [512];

  always #5 clk = ~clk;

  ecc_bram dut (.clk, .wden, .wraddr, .di, .rden, .rdaddr, .do_(dout), .ecc, .sbiterr, .dbiterr,
                .upset_en, .upset_addr, .upset_mask);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write(input logic [8:0] a, input logic [63:0] d);
    @(negedge clk); wden = 1'b1; wraddr = a; di = d;
    @(negedge clk); wden = 1'b0;
  endtask

  // Issue a read; the result is sampled one clock later.
  task automatic read(input logic [8:0] a, output logic [63:0] d, output logic s, output logic db);
    @(negedge clk); rden = 1'b1; rdaddr = a;
    @(negedge clk); rden = 1'b0;
    d = dout; s = sbiterr; db = dbiterr;
  endtask

  task automatic upset(input logic [8:0] a, input logic [71:0] m);
    @(negedge clk); upset_en = 1'b1; upset_addr = a; upset_mask = m;
    @(negedge clk); upset_en = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    logic s, db;
    int b1, b2;
    rst_n = 1'b1;
    for (int a = 0; a < 512; a++) begin
      ref_mem[a] = {$urandom(), $urandom()};
      write(9'(a), ref_mem[a]);
    end
    for (int a = 0; a < 512; a++) begin
      read(9'(a), d, s, db);
      check(d == ref_mem[a] && !s && !db, $sformatf("clean read %0d", a));
    end
    // every single-bit upset is corrected at the output
    for (int b = 0; b < 72; b++) begin
      int a;
      a = $urandom_range(0, 511);
      upset(9'(a), 72'(1) << b);
      read(9'(a), d, s, db);
      check(d == ref_mem[a] && s && !db, $sformatf("single upset bit %0d: d=%h s=%b db=%b", b, d, s, db));
      // the cell itself is still wrong: a second read flags it again
      read(9'(a), d, s, db);
      check(s, "error stays in the cell until written back");
      write(9'(a), ref_mem[a]);
      read(9'(a), d, s, db);
      check(d == ref_mem[a] && !s && !db, "rewrite clears the error");
    end
    // double upsets are detected, not miscorrected as single
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(0, 511);
      b1 = $urandom_range(0, 71);
      do b2 = $urandom_range(0, 71); while (b2 == b1);
      upset(9'(a), (72'(1) << b1) | (72'(1) << b2));
      read(9'(a), d, s, db);
      check(db && !s, $sformatf("double upset bits %0d,%0d", b1, b2));
      write(9'(a), ref_mem[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
