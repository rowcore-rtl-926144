// prefetch_buffer: flow-controlled, cross-corelet row prefetch buffer.
//
// What it does: holds the DRAM rows that the corelets are about to process.
// Each entry holds one whole row and is split into as many 64-byte slabs as
// there are corelets, so that corelet i only ever reads slab i (its slab-wide
// slice of every entry).  One demand fetch by any corelet starts the prefetch
// of the next row for all of them, and a per-entry counter stops a leading
// corelet from re-allocating an entry that lagging corelets have not consumed.
//
// How it works (this follows the processor's description):
//  * The entries form a circular queue.  Each has an address tag (row number),
//    a prefetch-trigger bit and a demand-fetch counter.
//  * The trigger bit is set when the prefetched row starts to arrive.  The
//    first demand fetch that sees it set clears it and allocates the next
//    entry for row+1, issuing its prefetch.  Later demand fetches see the bit
//    clear and issue nothing, so the corelets never issue redundant prefetches.
//  * Every successful demand fetch increments the entry's counter; an entry can
//    be re-allocated only once its counter has saturated at the corelet count.
//    If the next entry (the head) is not yet consumed, the trigger is left set
//    and a later demand fetch to the same entry issues the prefetch once the
//    head has saturated.
//  * Rows arrive as 128-byte transfer units; each unit has its own valid bit so
//    a leading corelet whose slab has arrived proceeds without waiting for the
//    rest of the row.
//  * For rate matching it reports two events: ev_empty when a corelet's demand
//    fetch finds its row not (yet) in the buffer (reported once per row), and
//    ev_full when a prefetch trigger is held back by an unconsumed head entry
//    (reported once per entry allocation).
// This design's own choices: the trigger bit is set by the first arriving
// beat of the row; prefetching stops after last_row; prefetch lookahead is one
// row; a new run is started with start/start_row, which flushes the buffer
// and prefetches start_row.
//
// Interface and timing: demand fetches (dem_req/dem_row per corelet) are
// answered in the same cycle (dem_hit, dem_slab); the counter and trigger
// update at the clock edge.  Prefetch requests leave on pq_* with a
// valid/ready handshake; fill data returns on fill_* one 128-bit beat at a
// time, beats of a unit in order.
module prefetch_buffer
  import rowcore_pkg::*;
#(
  parameter int unsigned N_CORELETS = N_CORELETS_DEF,
  parameter int unsigned ENTRIES    = PB_ENTRIES_DEF,
  localparam int unsigned EW        = $clog2(ENTRIES),
  localparam int unsigned ROW_BYTES = N_CORELETS * SLAB_BYTES,
  localparam int unsigned UNITS     = ROW_BYTES / UNIT_BYTES,
  localparam int unsigned BEATS     = ROW_BYTES * 8 / CHAN_BITS,
  localparam int unsigned BW        = $clog2(BEATS),
  localparam int unsigned CNTW      = $clog2(N_CORELETS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // run control
  input  logic                  start,
  input  row_addr_t             start_row,
  input  row_addr_t             last_row,
  // demand fetches, one port per corelet
  input  logic [N_CORELETS-1:0] dem_req,
  input  row_addr_t             dem_row  [N_CORELETS],
  output logic [N_CORELETS-1:0] dem_hit,
  output slab_t                 dem_slab [N_CORELETS],
  // prefetch requests to the row fetch unit
  output logic                  pq_valid,
  input  logic                  pq_ready,
  output row_addr_t             pq_row,
  output logic [EW-1:0]         pq_entry,
  // fill beats from the row fetch unit
  input  logic                  fill_valid,
  input  logic [EW-1:0]         fill_entry,
  input  logic [BW-1:0]         fill_beat,
  input  beat_t                 fill_data,
  // rate-matching events
  output logic                  ev_empty,
  output logic                  ev_full
);

  localparam int unsigned SW = $clog2(N_CORELETS);
  localparam int unsigned UW = (UNITS > 1) ? $clog2(UNITS) : 1;

  // per-entry state
  row_addr_t               tag   [ENTRIES];
  logic [ENTRIES-1:0]      tvalid, trig, full_rep;
  logic [CNTW-1:0]         cnt   [ENTRIES];
  logic [UNITS-1:0]        uvalid [ENTRIES];
  slab_t                   data  [ENTRIES][N_CORELETS];

  logic                    empty_seen;
  row_addr_t               empty_row;

  // ---------------- lookup, one per corelet ----------------
  logic [EW-1:0] hit_e [N_CORELETS];
  always_comb begin
    for (int i = 0; i < N_CORELETS; i++) begin
      dem_hit[i] = 1'b0;
      hit_e[i]   = '0;
      for (int e = 0; e < ENTRIES; e++) begin
        if (tvalid[e] && tag[e] == dem_row[i] && uvalid[e][(i * SLAB_BYTES) / UNIT_BYTES]) begin
          dem_hit[i] = dem_req[i];
          hit_e[i]   = EW'(e);
        end
      end
      dem_slab[i] = data[hit_e[i]][i];
    end
  end

  // ---------------- demand-fetch counting and trigger ----------------
  logic [CNTW-1:0]    inc   [ENTRIES];
  logic [ENTRIES-1:0] touch;
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      inc[e]   = '0;
      touch[e] = 1'b0;
    end
    for (int i = 0; i < N_CORELETS; i++) begin
      if (dem_hit[i]) begin
        inc[hit_e[i]]   = inc[hit_e[i]] + CNTW'(1);
        touch[hit_e[i]] = 1'b1;
      end
    end
  end

  // entry whose trigger fires this cycle (at most one entry has its bit set)
  logic          tr_any, tr_ok, tr_blocked, tr_end;
  logic [EW-1:0] tr_e, nx_e;
  always_comb begin
    tr_any = 1'b0;
    tr_e   = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (!tr_any && trig[e] && touch[e]) begin
        tr_any = 1'b1;
        tr_e   = EW'(e);
      end
    end
    nx_e       = EW'((32'(tr_e) + 1) % ENTRIES);
    tr_end     = tr_any && (tag[tr_e] >= last_row);
    // the head is free when never used or fully consumed (counter saturated)
    tr_blocked = tr_any && !tr_end && tvalid[nx_e] && (cnt[nx_e] != CNTW'(N_CORELETS));
    tr_ok      = tr_any && !tr_end && !tr_blocked && !pq_valid;
  end

  // first miss of a row: the buffers were found empty by a leading corelet
  logic      miss_any;
  row_addr_t miss_row;
  always_comb begin
    miss_any = 1'b0;
    miss_row = '0;
    for (int i = N_CORELETS - 1; i >= 0; i--) begin
      if (dem_req[i] && !dem_hit[i]) begin
        miss_any = 1'b1;
        miss_row = dem_row[i];
      end
    end
  end

  assign ev_empty = miss_any && !(empty_seen && empty_row == miss_row);
  assign ev_full  = tr_blocked && !full_rep[tr_e];

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tvalid     <= '0;
      trig       <= '0;
      full_rep   <= '0;
      pq_valid   <= 1'b0;
      pq_row     <= '0;
      pq_entry   <= '0;
      empty_seen <= 1'b0;
      empty_row  <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        tag[e]    <= '0;
        cnt[e]    <= CNTW'(N_CORELETS);
        uvalid[e] <= '0;
      end
    end else if (start) begin
      // flush and prefetch the first row into entry 0
      tvalid     <= '0;
      trig       <= '0;
      full_rep   <= '0;
      empty_seen <= 1'b0;
      for (int e = 0; e < ENTRIES; e++) begin
        cnt[e]    <= CNTW'(N_CORELETS);
        uvalid[e] <= '0;
      end
      tvalid[0]  <= 1'b1;
      tag[0]     <= start_row;
      cnt[0]     <= '0;
      pq_valid   <= 1'b1;
      pq_row     <= start_row;
      pq_entry   <= '0;
    end else begin
      if (pq_valid && pq_ready) pq_valid <= 1'b0;

      for (int e = 0; e < ENTRIES; e++) begin
        if (inc[e] != '0) begin
          if (32'(cnt[e]) + 32'(inc[e]) >= N_CORELETS) cnt[e] <= CNTW'(N_CORELETS);
          else cnt[e] <= cnt[e] + inc[e];
        end
      end

      if (fill_valid) begin
        if (fill_beat % BW'(BEATS_PER_UNIT) == BW'(BEATS_PER_UNIT - 1))
          uvalid[fill_entry][UW'(fill_beat / BW'(BEATS_PER_UNIT))] <= 1'b1;
        if (uvalid[fill_entry] == '0 && fill_beat == '0) trig[fill_entry] <= 1'b1;
      end

      if (ev_empty) begin
        empty_seen <= 1'b1;
        empty_row  <= miss_row;
      end
      if (ev_full) full_rep[tr_e] <= 1'b1;

      if (tr_end) trig[tr_e] <= 1'b0;
      if (tr_ok) begin
        trig[tr_e]     <= 1'b0;
        tvalid[nx_e]   <= 1'b1;
        tag[nx_e]      <= tag[tr_e] + row_addr_t'(1);
        cnt[nx_e]      <= '0;
        uvalid[nx_e]   <= '0;
        trig[nx_e]     <= 1'b0;
        full_rep[nx_e] <= 1'b0;
        pq_valid       <= 1'b1;
        pq_row         <= tag[tr_e] + row_addr_t'(1);
        pq_entry       <= nx_e;
      end
    end
  end

  // row storage: beat b of a row lands in slab b/4, quarter b%4
  always_ff @(posedge clk) begin
    if (fill_valid)
      data[fill_entry][SW'(fill_beat / BW'(BEATS_PER_SLAB))]
          [CHAN_BITS * (fill_beat % BW'(BEATS_PER_SLAB)) +: CHAN_BITS] <= fill_data;
  end

  // flow-control rule: never re-allocate an entry before it is fully consumed
  always_ff @(posedge clk) begin
    if (rst_n && !start && tr_ok) assert (!tvalid[nx_e] || cnt[nx_e] == CNTW'(N_CORELETS))
      else $error("prefetch_buffer: re-allocated an entry that is not fully consumed");
  end

endmodule
