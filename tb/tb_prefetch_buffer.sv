// tb_prefetch_buffer: self-checking test of the flow-controlled prefetch
// buffer with 4 corelets and 4 entries.
//
// The testbench models the corelets (each demand-fetches rows in order and
// then "computes" for a corelet-specific number of cycles; corelet 0 is fast,
// corelet 3 slow, so the leader wraps around the queue and must be held back)
// and the row fetcher (each prefetch request is answered, after a latency, by
// the row's beats, unit by unit).  It checks:
//  * every slab returned matches the row's data;
//  * rows are prefetched exactly once each, in order, and never past last_row;
//  * a prefetch is issued in the cycle after the first demand fetch of the
//    previous row when the head entry is free;
//  * an entry is only re-allocated after all corelets have fetched its row;
//  * a full event is reported only when a corelet fetches the newest row
//    while the oldest row in the queue is still unconsumed;
//  * the empty and full events, a held-back trigger, and a hit on a partly
//    arrived row each happen at least once.
module tb_prefetch_buffer;
  import rowcore_pkg::*;
  import tb_data_pkg::*;

  localparam int N  = 4;
  localparam int E  = 4;
  localparam int BEATS = N * SLAB_BYTES * 8 / CHAN_BITS;   // 16
  localparam int R0 = 100, NR = 40;
  localparam int LAT = 20;

  logic clk = 0, rst_n = 0, start = 0;
  row_addr_t start_row = row_addr_t'(R0), last_row = row_addr_t'(R0 + NR - 1);
  logic [N-1:0] dem_req = '0, dem_hit;
  row_addr_t dem_row [N];
  slab_t     dem_slab [N];
  logic pq_valid, pq_ready = 1;
  row_addr_t pq_row;
  logic [1:0] pq_entry;
  logic fill_valid = 0; logic [1:0] fill_entry = '0; logic [3:0] fill_beat = '0; beat_t fill_data = '0;
  logic ev_empty, ev_full;

  prefetch_buffer #(.N_CORELETS(N), .ENTRIES(E)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_empty = 0, n_full = 0, n_early = 0, n_pf = 0, n_held = 0;
  int pos [N];        // next row each corelet fetches
  int busy [N];       // compute cycles left
  int speed [N];
  int entry_row [E];  // row held by each entry (tb view), -1 if none
  int beats_in [E];   // beats filled so far into each entry
  int last_pf_row;
  int first_hit_cycle [int];
  int cyc = 0;

  // fetcher model
  int fq_row [$], fq_entry [$], fq_time [$];
  int f_beat = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      pos[i] = R0; busy[i] = 0; dem_row[i] = '0;
    end
    speed[0] = 3; speed[1] = 12; speed[2] = 14; speed[3] = 40;
    for (int e = 0; e < E; e++) begin entry_row[e] = -1; beats_in[e] = 0; end
    last_pf_row = R0 - 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;

    forever begin
      bit all_done;
      // ---- drive: fill beats ----
      fill_valid = 0;
      if (fq_row.size() > 0 && cyc >= fq_time[0]) begin
        fill_valid = 1;
        fill_entry = 2'(fq_entry[0]);
        fill_beat  = 4'(f_beat);
        for (int k = 0; k < 4; k++) fill_data[32*k +: 32] = input_word(fq_row[0], f_beat * 4 + k);
        beats_in[fq_entry[0]]++;
        f_beat++;
        if (f_beat == BEATS) begin
          f_beat = 0;
          void'(fq_row.pop_front()); void'(fq_entry.pop_front()); void'(fq_time.pop_front());
        end
      end
      // ---- drive: demand fetches ----
      for (int i = 0; i < N; i++) begin
        dem_req[i] = (busy[i] == 0) && (pos[i] < R0 + NR);
        dem_row[i] = row_addr_t'(pos[i]);
      end
      // phase change: the slow corelet speeds up half way
      if (pos[3] == R0 + NR / 2) speed[3] = 2;
      #1;
      // ---- observe ----
      if (ev_empty) n_empty++;
      if (ev_full)  n_full++;
      if (dut.tr_blocked) n_held++;
      // a full event is genuine only if a corelet is fetching the newest row
      // (the tail) while the oldest row in the queue (the head) is still
      // unconsumed by some corelet
      if (ev_full) begin
        bit at_tail, head_busy;
        at_tail = 0; head_busy = 0;
        for (int i = 0; i < N; i++) begin
          if (dem_hit[i] && pos[i] == last_pf_row) at_tail = 1;
          if (pos[i] <= last_pf_row - E + 1) head_busy = 1;
        end
        checks++;
        if (!at_tail || !head_busy || last_pf_row >= R0 + NR - 1)
          fail($sformatf("full event with tail row %0d: tail fetched %0d, head unconsumed %0d",
                         last_pf_row, at_tail, head_busy));
      end
      for (int i = 0; i < N; i++) begin
        if (dem_hit[i]) begin
          int e;
          e = -1;
          for (int x = 0; x < E; x++) if (entry_row[x] == pos[i]) e = x;
          checks++;
          if (e < 0) fail($sformatf("corelet %0d hit row %0d that no entry holds", i, pos[i]));
          else if (beats_in[e] < BEATS) n_early++;
          for (int k = 0; k < 16; k++)
            if (dem_slab[i][32*k +: 32] !== input_word(pos[i], i * 16 + k)) begin
              fail($sformatf("corelet %0d row %0d word %0d wrong data", i, pos[i], k));
              break;
            end
          if (!first_hit_cycle.exists(pos[i])) first_hit_cycle[pos[i]] = cyc;
          pos[i]++;
          busy[i] = speed[i];
        end else if (busy[i] > 0) busy[i]--;
      end
      all_done = 1;
      for (int i = 0; i < N; i++) if (pos[i] < R0 + NR) all_done = 0;
      // ---- prefetch request (accepted this cycle) ----
      if (pq_valid && pq_ready) begin
        int r, e;
        r = int'(pq_row); e = int'(pq_entry);
        n_pf++;
        checks++;
        if (r != last_pf_row + 1) fail($sformatf("prefetch of row %0d after row %0d", r, last_pf_row));
        if (r >= R0 + NR) fail($sformatf("prefetch past last row: %0d", r));
        if (entry_row[e] >= 0)
          for (int i = 0; i < N; i++)
            if (pos[i] <= entry_row[e])
              fail($sformatf("entry %0d (row %0d) re-allocated before corelet %0d consumed it", e, entry_row[e], i));
        // the prefetch follows the first demand fetch of the previous row
        if (r > R0 && first_hit_cycle.exists(r - 1) && !dut.full_rep[(e + E - 1) % E]) begin
          checks++;
          if (cyc - first_hit_cycle[r - 1] != 1)
            fail($sformatf("prefetch of row %0d issued %0d cycles after first fetch of row %0d",
                           r, cyc - first_hit_cycle[r - 1], r - 1));
        end
        last_pf_row = r;
        entry_row[e] = r;
        beats_in[e] = 0;
        fq_row.push_back(r); fq_entry.push_back(e); fq_time.push_back(cyc + LAT);
      end
      if (all_done) break;
      @(negedge clk);
      cyc++;
    end

    checks++; if (n_pf != NR) fail($sformatf("%0d prefetches for %0d rows", n_pf, NR));
    checks++; if (n_empty == 0) fail("empty event never happened");
    checks++; if (n_full == 0)  fail("full event never happened");
    checks++; if (n_held == 0)  fail("trigger was never held back");
    checks++; if (n_early == 0) fail("no hit on a partly arrived row");
    $display("cycles=%0d prefetches=%0d empty=%0d full=%0d held=%0d early_hits=%0d",
             cyc, n_pf, n_empty, n_full, n_held, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
