// row_fetch_unit: moves a whole DRAM row into a prefetch buffer entry.
//
// What it does: a row prefetch cannot be one 2 KB access on a standard DRAM
// interface, so the row is read as a sequence of 128-byte transfer units, each
// returned as eight 128-bit beats on the channel.  The unit accepts row
// prefetch requests from the prefetch buffer, issues one read command per
// transfer unit of the row (units 0, 1, ... in order, so the row stays open
// for all of them), and writes every returning beat into the right place of
// the target entry.  Because the units land one after another, corelets whose
// slabs arrive first can start before the row has fully arrived.
//
// How it works: requests wait in a small FIFO (REQ_DEPTH rows).  A command
// counter walks the units of the oldest request.  Every command issued also
// pushes (entry, unit) into an in-order tag FIFO of OUTSTANDING places, which
// matches the memory controller's queue depth; a beat counter steps through
// the eight beats of the oldest tag as data returns.  The command/beat channel
// protocol (valid/ready commands, in-order beats without back-pressure) is
// this design's own choice; a memory controller sits on the other side.
//
// Timing: one command per cycle when cmd_ready is high; one fill beat per
// cycle, in the cycle the beat arrives.
module row_fetch_unit
  import rowcore_pkg::*;
#(
  parameter int unsigned N_CORELETS  = N_CORELETS_DEF,
  parameter int unsigned ENTRIES     = PB_ENTRIES_DEF,
  parameter int unsigned REQ_DEPTH   = 2,
  parameter int unsigned OUTSTANDING = 16,
  localparam int unsigned EW        = $clog2(ENTRIES),
  localparam int unsigned ROW_BYTES = N_CORELETS * SLAB_BYTES,
  localparam int unsigned UNITS     = ROW_BYTES / UNIT_BYTES,
  localparam int unsigned UW        = (UNITS > 1) ? $clog2(UNITS) : 1,
  localparam int unsigned BEATS     = ROW_BYTES * 8 / CHAN_BITS,
  localparam int unsigned BW        = $clog2(BEATS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // row prefetch requests
  input  logic          pq_valid,
  output logic          pq_ready,
  input  row_addr_t     pq_row,
  input  logic [EW-1:0] pq_entry,
  // DRAM channel: read commands for one transfer unit each
  output logic          cmd_valid,
  input  logic          cmd_ready,
  output row_addr_t     cmd_row,
  output logic [UW-1:0] cmd_unit,
  // DRAM channel: returning beats, in command order
  input  logic          rsp_valid,
  input  beat_t         rsp_data,
  // writes into the prefetch buffer
  output logic          fill_valid,
  output logic [EW-1:0] fill_entry,
  output logic [BW-1:0] fill_beat,
  output beat_t         fill_data
);

  localparam int unsigned QW = $clog2(REQ_DEPTH);
  localparam int unsigned OW = $clog2(OUTSTANDING);
  localparam int unsigned KW = $clog2(BEATS_PER_UNIT);

  // ---- request FIFO ----
  row_addr_t     rq_row   [REQ_DEPTH];
  logic [EW-1:0] rq_entry [REQ_DEPTH];
  logic [QW-1:0] rq_rd, rq_wr;
  logic [QW:0]   rq_cnt;

  // ---- outstanding-command tag FIFO ----
  logic [EW-1:0] ot_entry [OUTSTANDING];
  logic [UW-1:0] ot_unit  [OUTSTANDING];
  logic [OW-1:0] ot_rd, ot_wr;
  logic [OW:0]   ot_cnt;

  logic [UW-1:0] unit_ctr;
  logic [KW-1:0] beat_ctr;

  logic rq_push, rq_pop, cmd_fire, ot_pop;

  assign pq_ready  = (rq_cnt != (QW+1)'(REQ_DEPTH));
  assign rq_push   = pq_valid && pq_ready;
  assign cmd_valid = (rq_cnt != '0) && (ot_cnt != (OW+1)'(OUTSTANDING));
  assign cmd_row   = rq_row[rq_rd];
  assign cmd_unit  = unit_ctr;
  assign cmd_fire  = cmd_valid && cmd_ready;
  assign rq_pop    = cmd_fire && (unit_ctr == UW'(UNITS - 1));
  assign ot_pop    = rsp_valid && (beat_ctr == KW'(BEATS_PER_UNIT - 1));

  assign fill_valid = rsp_valid;
  assign fill_entry = ot_entry[ot_rd];
  assign fill_beat  = BW'({ot_unit[ot_rd], beat_ctr});
  assign fill_data  = rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_rd <= '0; rq_wr <= '0; rq_cnt <= '0;
      ot_rd <= '0; ot_wr <= '0; ot_cnt <= '0;
      unit_ctr <= '0;
      beat_ctr <= '0;
    end else begin
      if (rq_push) begin
        rq_row[rq_wr]   <= pq_row;
        rq_entry[rq_wr] <= pq_entry;
        rq_wr <= QW'((32'(rq_wr) + 1) % REQ_DEPTH);
      end
      if (rq_pop) rq_rd <= QW'((32'(rq_rd) + 1) % REQ_DEPTH);
      rq_cnt <= rq_cnt + (QW+1)'(rq_push) - (QW+1)'(rq_pop);

      if (cmd_fire) begin
        ot_entry[ot_wr] <= rq_entry[rq_rd];
        ot_unit[ot_wr]  <= unit_ctr;
        ot_wr    <= OW'((32'(ot_wr) + 1) % OUTSTANDING);
        unit_ctr <= rq_pop ? '0 : unit_ctr + UW'(1);
      end
      if (rsp_valid) beat_ctr <= beat_ctr + KW'(1);
      if (ot_pop) ot_rd <= OW'((32'(ot_rd) + 1) % OUTSTANDING);
      ot_cnt <= ot_cnt + (OW+1)'(cmd_fire) - (OW+1)'(ot_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!rsp_valid || ot_cnt != '0)
      else $error("row_fetch_unit: data beat with no command outstanding");
  end

endmodule
