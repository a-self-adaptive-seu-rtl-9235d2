// Testbench for bram_scrubber. Standalone mode (driven by the address
// generator): single upsets are reported once with the right address and
// corrected data and are gone in later sweeps; double upsets are reported once
// and repaired from the pattern. Integrated mode (driven by the testbench as
// user controller): reads return corrected data after one clock, a single
// upset is written back (usr_wr_ready drops for that clock), a double upset
// is reported on every read.
module tb_bram_scrubber;
  logic        clk = 1'b0, rst_n = 1'b0, standalone = 1'b0;
  logic        ag_rd_en, ag_wr_en, ag_en = 1'b0, init_done;
  logic [8:0]  ag_rd_addr, ag_wr_addr;
  logic [63:0] ag_wr_data;
  logic        usr_rd_en = 1'b0, usr_wr_en = 1'b0;
  logic [8:0]  usr_rd_addr = '0, usr_wr_addr = '0;
  logic [63:0] usr_wr_data = '0, usr_rd_data;
  logic        usr_wr_ready, usr_rd_valid;
  logic        err_sbit, err_dbit;
  logic [8:0]  err_addr;
  logic [63:0] err_data;
  logic [7:0]  err_ecc;
  logic        upset_en = 1'b0;
  logic [8:0]  upset_addr = '0;
  logic [71:0] upset_mask = '0;
  int          checks = 0, failures = 0;
  int          n_sbit = 0, n_dbit = 0;
  logic [8:0]  last_err_addr;
  logic [63:0] last_err_data;
  logic [63:0] ref_mem [512];

  always #5 clk = ~clk;

  address_generator u_ag (.clk, .rst_n, .enable(ag_en), .rd_en(ag_rd_en), .rd_addr(ag_rd_addr),
                          .wr_en(ag_wr_en), .wr_addr(ag_wr_addr), .wr_data(ag_wr_data), .init_done);

  bram_scrubber dut (.clk, .rst_n, .standalone, .ag_rd_en, .ag_rd_addr, .ag_wr_en, .ag_wr_addr,
    .ag_wr_data, .usr_rd_en, .usr_rd_addr, .usr_wr_en, .usr_wr_addr, .usr_wr_data, .usr_wr_ready,
    .usr_rd_data, .usr_rd_valid, .err_sbit, .err_dbit, .err_addr, .err_data, .err_ecc,
    .upset_en, .upset_addr, .upset_mask);

  function automatic logic [63:0] expect_pattern(input int a);
    logic [8:0]  x;
    logic [31:0] v;
    x = 9'(a);
    v = {x, ~x, x, 5'b10101} ^ 32'h5A3C_96E1;
    return {~v, v};
  endfunction

  always @(negedge clk) begin
    if (err_sbit) begin n_sbit++; last_err_addr = err_addr; last_err_data = err_data; end
    if (err_dbit) begin n_dbit++; last_err_addr = err_addr; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic upset(input int a, input logic [71:0] m);
    @(negedge clk); upset_en = 1'b1; upset_addr = 9'(a); upset_mask = m;
    @(negedge clk); upset_en = 1'b0;
  endtask

  task automatic sweeps(input int n);
    repeat (n * 512 + 4) @(negedge clk);
  endtask

  task automatic usr_read(input int a, output logic [63:0] d);
    @(negedge clk); usr_rd_en = 1'b1; usr_rd_addr = 9'(a);
    @(negedge clk); usr_rd_en = 1'b0;
    check(usr_rd_valid, "read valid one clock after request");
    d = usr_rd_data;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    int a;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---------------- standalone sensor mode ----------------
    standalone = 1'b1; ag_en = 1'b1;
    wait (init_done);
    sweeps(2);
    check(n_sbit == 0 && n_dbit == 0, "no errors after pattern fill");
    for (int k = 0; k < 20; k++) begin
      a = $urandom_range(0, 511);
      n_sbit = 0; n_dbit = 0;
      upset(a, 72'(1) << $urandom_range(0, 71));
      sweeps(1);
      check(n_sbit == 1 && n_dbit == 0, $sformatf("single upset seen once (%0d,%0d)", n_sbit, n_dbit));
      check(last_err_addr == 9'(a) && last_err_data == expect_pattern(a), "error address and corrected data");
      sweeps(2);
      check(n_sbit == 1, "single upset scrubbed");
    end
    for (int k = 0; k < 10; k++) begin
      a = $urandom_range(0, 511);
      n_sbit = 0; n_dbit = 0;
      upset(a, 72'(3) << $urandom_range(0, 70));
      sweeps(3);
      check(n_dbit == 1 && n_sbit == 0 && last_err_addr == 9'(a),
            $sformatf("double upset reported once and repaired (%0d,%0d)", n_sbit, n_dbit));
    end
    // ---------------- integrated sensor mode ----------------
    standalone = 1'b0; ag_en = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      ref_mem[i] = {$urandom(), $urandom()};
      usr_wr_en = 1'b1; usr_wr_addr = 9'(i); usr_wr_data = ref_mem[i];
      check(usr_wr_ready, "user write accepted");
      @(negedge clk);
    end
    usr_wr_en = 1'b0;
    for (int i = 0; i < 64; i++) begin
      usr_read(i, d);
      check(d == ref_mem[i], "user read back");
    end
    for (int k = 0; k < 10; k++) begin
      a = $urandom_range(0, 63);
      n_sbit = 0;
      upset(a, 72'(1) << $urandom_range(0, 71));
      @(negedge clk); usr_rd_en = 1'b1; usr_rd_addr = 9'(a);
      @(negedge clk); usr_rd_en = 1'b0;
      check(usr_rd_data == ref_mem[a] && err_sbit, "corrected data on user read");
      check(!usr_wr_ready, "user write held off during scrub write");
      usr_read(a, d);
      check(d == ref_mem[a] && n_sbit == 1, "word scrubbed after one read");
    end
    a = 5;
    n_dbit = 0;
    upset(a, 72'(3) << 10);
    repeat (3) usr_read(a, d);
    @(negedge clk);
    check(n_dbit == 3, $sformatf("double error stays in integrated mode (%0d)", n_dbit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
