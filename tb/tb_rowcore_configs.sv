// tb_rowcore_configs: the system-size and buffer-count configurations of the
// RowCore evaluation, each running the count/variance kernel end to end:
//   64 corelets with 4-KB prefetch-buffer entries (32 transfer units per
//   entry) and 4 entries;
//   32 corelets with 32 entries (the largest buffer count evaluated);
//   32 corelets with 4 entries.
// Each configuration is a tb_config_run instance with its own processor and
// DRAM channel model; they run one after another.  The totals of their checks
// are reported; a watchdog stops a hung run.
module tb_rowcore_configs;

  logic clk = 0, rst_n = 0;
  logic go0 = 0, go1 = 0, go2 = 0;
  logic fin0, fin1, fin2;
  int   c0, c1, c2, f0, f1, f2;

  tb_config_run #(.N(64), .E(4),  .R0(300), .NR(24), .FULL_EXPECTED(1'b1)) u_n64_e4
    (.clk, .rst_n, .go(go0), .fin(fin0), .checks(c0), .failures(f0));
  tb_config_run #(.N(32), .E(32), .R0(500), .NR(48), .FULL_EXPECTED(1'b0)) u_n32_e32
    (.clk, .rst_n, .go(go1), .fin(fin1), .checks(c1), .failures(f1));
  tb_config_run #(.N(32), .E(4),  .R0(700), .NR(24), .FULL_EXPECTED(1'b1)) u_n32_e4
    (.clk, .rst_n, .go(go2), .fin(fin2), .checks(c2), .failures(f2));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    go0 = 1; wait (fin0);
    go1 = 1; wait (fin1);
    go2 = 1; wait (fin2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

endmodule
