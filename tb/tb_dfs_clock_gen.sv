// tb_dfs_clock_gen: self-checking test of the frequency-scaled clock enable.
//
// For several frequencies, counts ce over whole periods of the base clock
// (1200 cycles stand for 1 us at 1200 MHz) and requires exactly freq_mhz
// enables per period, and checks that the enables are spread evenly: the gap
// between two enables never exceeds ceil(1200 / freq).
module tb_dfs_clock_gen;
  logic clk = 0, rst_n = 0;
  logic [9:0] freq_mhz = 10'd700;
  logic ce;
  int checks = 0, failures = 0;

  dfs_clock_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    int freqs [5] = '{700, 665, 350, 175, 1000};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (freqs[j]) begin
      int n, gap, maxgap;
      @(negedge clk) freq_mhz = 10'(freqs[j]);
      repeat (1200) @(negedge clk);          // settle
      n = 0; gap = 0; maxgap = 0;
      repeat (2 * 1200) begin
        @(negedge clk);
        gap++;
        if (ce) begin n++; if (gap > maxgap) maxgap = gap; gap = 0; end
      end
      checks++;
      if (n != 2 * freqs[j]) begin
        failures++; $display("FAIL: %0d MHz gave %0d enables in 2 us", freqs[j], n);
      end
      checks++;
      if (maxgap > (1200 + freqs[j] - 1) / freqs[j]) begin
        failures++; $display("FAIL: %0d MHz max gap %0d", freqs[j], maxgap);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
