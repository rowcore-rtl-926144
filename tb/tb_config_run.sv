// tb_config_run: testbench helper that runs the count/variance kernel on one
// RowCore processor configuration (N_CORELETS corelets, ENTRIES prefetch
// buffer entries) and checks it; used by tb_rowcore_configs.
//
// When go rises it resets nothing itself (the parent drives rst_n), broadcasts
// the program, presets the row range in every corelet, pulses start with rate
// matching on, waits for done and performs the final Reduce by reading all
// corelets' local memories.  Checks: every corelet's partial results against
// tb_kernels_pkg::variance_ref; one prefetch and one DRAM row open per row;
// demand-fetch stalls and prefetch-buffer empty events happen; with
// FULL_EXPECTED set, full events (held-back prefetch triggers) happen too.
// fin rises when the run is over; checks/failures then hold the totals.
module tb_config_run
  import rowcore_pkg::*;
  import tb_data_pkg::*;
  import tb_kernels_pkg::*;
#(
  parameter int N             = 64,
  parameter int E             = 4,
  parameter int R0            = 300,
  parameter int NR            = 24,
  parameter bit FULL_EXPECTED = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int UNITS = N * SLAB_BYTES / UNIT_BYTES;
  localparam int UW    = $clog2(UNITS);
  localparam int CIW   = $clog2(N);

  logic start = 0, rm_enable = 1, done;
  row_addr_t start_row = row_addr_t'(R0), last_row = row_addr_t'(R0 + NR - 1);
  logic prog_we = 0; logic [9:0] prog_addr = '0; logic [31:0] prog_data = '0;
  logic hm_we = 0; logic [CIW-1:0] hm_corelet = '0; logic [9:0] hm_addr = '0;
  logic [31:0] hm_wdata = '0, hm_rdata;
  logic cmd_valid, cmd_ready, rsp_valid;
  row_addr_t cmd_row;
  logic [UW-1:0] cmd_unit;
  beat_t rsp_data;
  logic [9:0] freq_mhz;
  logic ce, ev_empty, ev_full;
  int unsigned gap = 1, n_row_miss, n_cmds;

  rowcore_top #(.N_CORELETS(N), .ENTRIES(E)) dut (.*);
  dram_model #(.UW(UW)) mem (.clk, .rst_n, .gap, .cmd_valid, .cmd_ready, .cmd_row, .cmd_unit,
                             .rsp_valid, .rsp_data, .n_row_miss, .n_cmds);

  int n_stall = 0, n_empty = 0, n_full = 0, n_pf = 0, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < N; i++)
      if (dut.dem_req[i] && !dut.dem_hit[i]) n_stall++;
    if (ev_empty) n_empty++;
    if (ev_full) n_full++;
    if (dut.pq_valid && dut.pq_ready) n_pf++;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL (N=%0d E=%0d): %s", N, E, s);
  endtask

  initial begin
    int t0;
    fin = 0; checks = 0; failures = 0;
    wait (go && rst_n);
    for (int i = 0; i < VAR_LEN; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = variance_prog(i);
    end
    @(negedge clk) prog_we = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); hm_we = 1; hm_corelet = CIW'(i); hm_addr = 10'(PARAM_LO); hm_wdata = 32'(R0);
      @(negedge clk); hm_addr = 10'(PARAM_HI); hm_wdata = 32'(R0 + NR);
      @(negedge clk); hm_addr = 10'(PARAM_TURN); hm_wdata = 32'(R0);
    end
    @(negedge clk) hm_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    $display("N=%0d E=%0d: %0d rows in %0d cycles, stalls=%0d empty=%0d full=%0d prefetches=%0d row_opens=%0d freq=%0d MHz",
             N, E, NR, cyc - t0, n_stall, n_empty, n_full, n_pf, n_row_miss, freq_mhz);
    checks++; if (n_pf != NR) fail($sformatf("%0d prefetches for %0d rows", n_pf, NR));
    checks++; if (int'(n_row_miss) != NR) fail($sformatf("%0d row opens for %0d rows", n_row_miss, NR));
    checks++; if (int'(n_cmds) != NR * UNITS) fail($sformatf("%0d unit reads for %0d rows", n_cmds, NR));
    checks++; if (n_stall == 0) fail("no demand-fetch stall");
    checks++; if (n_empty == 0) fail("no empty event");
    if (FULL_EXPECTED) begin
      checks++; if (n_full == 0) fail("no full event");
    end
    for (int i = 0; i < N; i++)
      for (int kind = 0; kind < 4; kind++)
        for (int bin = 0; bin < NBINS; bin++) begin
          logic [31:0] acc;
          if (kind == 3 && bin > 0) continue;
          acc = 0;
          for (int c = 0; c < 4; c++) begin
            hm_corelet = CIW'(i);
            hm_addr = 10'(c * 64 + kind * 16 + bin);
            #1 acc += hm_rdata;
          end
          checks++;
          if (acc !== variance_ref(i, kind, bin, R0, R0 + NR))
            fail($sformatf("corelet %0d kind %0d bin %0d: %0d expected %0d", i, kind, bin,
                           acc, variance_ref(i, kind, bin, R0, R0 + NR)));
        end
    fin = 1;
  end

endmodule
