// tb_rowcore_top: end-to-end test of a RowCore processor (32 corelets) running
// the count/variance kernel over DRAM rows, with a 2-entry prefetch buffer so
// that flow control is exercised often.
//
// The host side broadcasts the program, presets the row range in every
// corelet, pulses start, waits for done and then performs the final Reduce by
// reading the partial results out of every corelet's local memory; each
// corelet's result is compared with tb_kernels_pkg::variance_ref.
//
// Run 1: rate matching on; the DRAM is slowed down (3 idle cycles per beat)
//        for the first half of the rows, so the kernel is memory-bound and
//        the clock must be stepped down, then runs at full speed, so the
//        corelets fall behind, the buffer fills and the clock is stepped up.
// Run 2: rate matching off (mode switch), full-speed DRAM: the clock must stay
//        at the nominal 700 MHz.
// Every mechanism is counted and must occur at least once: demand-fetch
// stalls, prefetch-buffer empty events, full events (held-back triggers),
// hits on partly arrived rows, frequency steps down and up, DRAM row opens
// (one per row: the row stays open for its 16 transfer units), and the
// one-prefetch-per-row rule (prefetch count equals row count).
module tb_rowcore_top;
  import rowcore_pkg::*;
  import tb_data_pkg::*;
  import tb_kernels_pkg::*;

  localparam int N  = 32;
  localparam int E  = 2;
  localparam int R0 = 40;
  localparam int NR = 32;

  logic clk = 0, rst_n = 0, start = 0, rm_enable = 1, done;
  row_addr_t start_row = row_addr_t'(R0), last_row = row_addr_t'(R0 + NR - 1);
  logic prog_we = 0; logic [9:0] prog_addr = '0; logic [31:0] prog_data = '0;
  logic hm_we = 0; logic [4:0] hm_corelet = '0; logic [9:0] hm_addr = '0;
  logic [31:0] hm_wdata = '0, hm_rdata;
  logic cmd_valid, cmd_ready, rsp_valid;
  row_addr_t cmd_row;
  logic [3:0] cmd_unit;
  beat_t rsp_data;
  logic [9:0] freq_mhz;
  logic ce, ev_empty, ev_full;
  int unsigned gap = 3, n_row_miss, n_cmds;

  rowcore_top #(.ENTRIES(E)) dut (.*);
  dram_model #(.UW(4)) mem (.clk, .rst_n, .gap, .cmd_valid, .cmd_ready, .cmd_row, .cmd_unit,
                            .rsp_valid, .rsp_data, .n_row_miss, .n_cmds);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_empty = 0, n_full = 0, n_early = 0, n_down = 0, n_up = 0, n_pf = 0;
  int min_freq = 1000, max_freq = 0;
  bit switch_gap = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < N; i++) begin
      if (dut.dem_req[i] && !dut.dem_hit[i]) n_stall++;
      if (dut.dem_hit[i] && dut.u_pbuf.uvalid[dut.u_pbuf.hit_e[i]] != '1) n_early++;
    end
    if (ev_empty) n_empty++;
    if (ev_full) n_full++;
    if (dut.u_rm.step_down) n_down++;
    if (dut.u_rm.step_up) n_up++;
    if (dut.pq_valid && dut.pq_ready) n_pf++;
    if (int'(freq_mhz) < min_freq) min_freq = int'(freq_mhz);
    if (int'(freq_mhz) > max_freq) max_freq = int'(freq_mhz);
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL: %s", s);
  endtask

  task automatic run(int first, int nrows);
    int t0, pf0, miss0;
    // row range into every corelet
    for (int i = 0; i < N; i++) begin
      @(negedge clk); hm_we = 1; hm_corelet = 5'(i); hm_addr = 10'(PARAM_LO); hm_wdata = 32'(first);
      @(negedge clk); hm_addr = 10'(PARAM_HI); hm_wdata = 32'(first + nrows);
      @(negedge clk); hm_addr = 10'(PARAM_TURN); hm_wdata = 32'(first);
    end
    @(negedge clk) hm_we = 0;
    start_row = row_addr_t'(first);
    last_row  = row_addr_t'(first + nrows - 1);
    pf0 = n_pf; miss0 = int'(n_row_miss);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    while (!done) begin
      @(negedge clk);
      if (switch_gap && dut.u_pbuf.tag[0] >= row_addr_t'(first + nrows / 2)) gap = 0;
    end
    $display("run rows %0d..%0d: %0d cycles, freq %0d..%0d MHz", first, first + nrows - 1,
             cyc - t0, min_freq, max_freq);
    checks++;
    if (n_pf - pf0 != nrows) fail($sformatf("%0d prefetches for %0d rows", n_pf - pf0, nrows));
    checks++;
    if (int'(n_row_miss) - miss0 != nrows) fail($sformatf("%0d DRAM row opens for %0d rows", int'(n_row_miss) - miss0, nrows));
    // final Reduce and per-corelet comparison
    for (int i = 0; i < N; i++)
      for (int kind = 0; kind < 4; kind++)
        for (int bin = 0; bin < NBINS; bin++) begin
          logic [31:0] acc;
          acc = 0;
          for (int c = 0; c < 4; c++) begin
            hm_corelet = 5'(i);
            hm_addr = 10'(c * 64 + kind * 16 + bin);
            #1 acc += hm_rdata;
          end
          if (kind == 3 && bin > 0) continue;
          checks++;
          if (acc !== variance_ref(i, kind, bin, first, first + nrows))
            fail($sformatf("corelet %0d kind %0d bin %0d: %0d expected %0d", i, kind, bin,
                           acc, variance_ref(i, kind, bin, first, first + nrows)));
        end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < VAR_LEN; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = variance_prog(i);
    end
    @(negedge clk) prog_we = 0;

    // run 1: memory-bound, rate matching on
    rm_enable = 1; gap = 3; switch_gap = 1;
    run(R0, NR);
    switch_gap = 0;
    checks++;
    if (min_freq >= 700) fail("rate matching never lowered the clock");

    // run 2: rate matching off, fast memory
    rm_enable = 0; gap = 0;
    @(negedge clk);
    @(negedge clk);
    min_freq = 1000; max_freq = 0;
    run(R0 + 100, NR);
    checks++;
    if (min_freq != 700 || max_freq != 700) fail("clock moved with rate matching off");

    $display("stalls=%0d empty=%0d full=%0d early_hits=%0d steps_down=%0d steps_up=%0d prefetches=%0d row_opens=%0d",
             n_stall, n_empty, n_full, n_early, n_down, n_up, n_pf, n_row_miss);
    checks++; if (n_stall == 0) fail("no demand-fetch stall");
    checks++; if (n_empty == 0) fail("no empty event");
    checks++; if (n_full == 0)  fail("no full event");
    checks++; if (n_early == 0) fail("no hit on a partly arrived row");
    checks++; if (n_down == 0)  fail("no frequency step down");
    checks++; if (n_up == 0)    fail("no frequency step up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
