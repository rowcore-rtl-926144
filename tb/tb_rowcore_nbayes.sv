// tb_rowcore_nbayes: end-to-end run of the naive Bayes counting kernel on the
// RowCore processor at its default size (32 corelets, 16 prefetch buffer
// entries), with rate matching on.
//
// The input uses slab interleaving: each 64-byte slab holds one whole record
// (a year word and 15 dimension words), so each row holds 32 records, one per
// corelet.  Every record takes a data-dependent class and 16 indirect
// increments into the local-memory count tables (tb_kernels_pkg::nbayes_prog).
// The host broadcasts the program, presets the row range, starts, waits for
// done, adds the four contexts' tables of every corelet (the final Reduce)
// and compares every count with tb_kernels_pkg::nbayes_ref.  Also checked:
// one prefetch and one DRAM row open per row, the class totals add up to the
// number of rows, and demand-fetch stalls, empty events and clock steps down
// happen (the DRAM is slowed to 4 idle cycles per beat, so the kernel is
// memory-bound).
module tb_rowcore_nbayes;
  import rowcore_pkg::*;
  import tb_data_pkg::*;
  import tb_kernels_pkg::*;

  localparam int N  = 32;
  localparam int R0 = 900;
  localparam int NR = 48;

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
  int unsigned gap = 4, n_row_miss, n_cmds;

  rowcore_top dut (.*);
  dram_model #(.UW(4)) mem (.clk, .rst_n, .gap, .cmd_valid, .cmd_ready, .cmd_row, .cmd_unit,
                            .rsp_valid, .rsp_data, .n_row_miss, .n_cmds);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_empty = 0, n_down = 0, n_pf = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < N; i++)
      if (dut.dem_req[i] && !dut.dem_hit[i]) n_stall++;
    if (ev_empty) n_empty++;
    if (dut.u_rm.step_down) n_down++;
    if (dut.pq_valid && dut.pq_ready) n_pf++;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL: %s", s);
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NB_LEN; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = nbayes_prog(i);
    end
    @(negedge clk) prog_we = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); hm_we = 1; hm_corelet = 5'(i); hm_addr = 10'(PARAM_LO); hm_wdata = 32'(R0);
      @(negedge clk); hm_addr = 10'(PARAM_HI); hm_wdata = 32'(R0 + NR);
      @(negedge clk); hm_addr = 10'(PARAM_TURN); hm_wdata = 32'(R0);
    end
    @(negedge clk) hm_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    $display("nbayes: %0d rows in %0d cycles, stalls=%0d empty=%0d steps_down=%0d prefetches=%0d row_opens=%0d freq=%0d MHz",
             NR, cyc - t0, n_stall, n_empty, n_down, n_pf, n_row_miss, freq_mhz);

    for (int i = 0; i < N; i++) begin
      logic [31:0] total;
      total = 0;
      for (int off = 0; off < 488; off += 4) begin
        logic [31:0] acc;
        acc = 0;
        for (int c = 0; c < 4; c++) begin
          hm_corelet = 5'(i);
          hm_addr = 10'((c * 512 + off) / 4);
          #1 acc += hm_rdata;
        end
        if (off >= 480) total += acc;
        checks++;
        if (acc !== nbayes_ref(i, off, R0, R0 + NR))
          fail($sformatf("corelet %0d offset %0d: %0d expected %0d", i, off, acc,
                         nbayes_ref(i, off, R0, R0 + NR)));
      end
      checks++;
      if (total != 32'(NR)) fail($sformatf("corelet %0d: class totals %0d for %0d records", i, total, NR));
    end
    checks++; if (n_pf != NR) fail($sformatf("%0d prefetches for %0d rows", n_pf, NR));
    checks++; if (int'(n_row_miss) != NR) fail($sformatf("%0d row opens for %0d rows", n_row_miss, NR));
    checks++; if (n_stall == 0) fail("no demand-fetch stall");
    checks++; if (n_empty == 0) fail("no empty event");
    checks++; if (n_down == 0)  fail("no frequency step down");
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
