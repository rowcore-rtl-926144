// rowcore_top: one RowCore processor on the logic die under a DRAM stack.
//
// What it does: runs the Map and partial Reduce of a big-data machine
// learning kernel over a sequence of DRAM rows.  The input is laid out so that
// each 2 KB row holds one 64-byte slab per corelet; the processor prefetches
// whole rows, every corelet processes its slab of each row in turn (MIMD: the
// corelets run the same code but at their own pace), and the partially
// reduced results stay in the corelets' local memories, from where the host
// copies them out for the final Reduce.
//
// How it is built:
//   corelet x N_CORELETS  - 4-context in-order cores with local memory
//   prefetch_buffer       - row-sized entries, prefetch-trigger bits and
//                           demand-fetch counters (flow-controlled prefetch)
//   row_fetch_unit        - row prefetch -> 128-byte transfer units on the
//                           DRAM channel -> fill beats
//   rate_matcher          - hill-climbing frequency control from the buffer's
//                           empty/full events
//   dfs_clock_gen         - turns the chosen frequency into a compute clock
//                           enable on the base (channel) clock
// The memory controller and the DRAM stack are outside: their command/beat
// channel is brought out (cmd_*, rsp_*), as are the host's ports.
//
// Interface and timing, host side: broadcast the program with prog_* (all
// corelets receive the same code), optionally preset local memory with hm_*,
// then pulse start with start_row/last_row, the first and last input rows.
// done rises when every context of every corelet has halted; then read the
// results with hm_corelet/hm_addr (combinational read).  rm_enable selects
// rate matching (1) or a fixed nominal clock (0).  All logic runs on clk; the
// corelets advance only in cycles where ce is high.
module rowcore_top
  import rowcore_pkg::*;
#(
  parameter int unsigned N_CORELETS  = N_CORELETS_DEF,
  parameter int unsigned ENTRIES     = PB_ENTRIES_DEF,
  parameter int unsigned LMEM_BYTES  = LMEM_BYTES_DEF,
  parameter int unsigned IMEM_BYTES  = IMEM_BYTES_DEF,
  parameter int unsigned BASE_MHZ    = BASE_MHZ_DEF,
  parameter int unsigned NOMINAL_MHZ = NOMINAL_MHZ_DEF,
  localparam int unsigned ROW_BYTES  = N_CORELETS * SLAB_BYTES,
  localparam int unsigned UNITS      = ROW_BYTES / UNIT_BYTES,
  localparam int unsigned UW         = (UNITS > 1) ? $clog2(UNITS) : 1,
  localparam int unsigned CIW        = (N_CORELETS > 1) ? $clog2(N_CORELETS) : 1,
  localparam int unsigned LMEM_AW    = $clog2(LMEM_BYTES / 4),
  localparam int unsigned IMEM_AW    = $clog2(IMEM_BYTES / 4),
  localparam int unsigned FW         = $clog2(NOMINAL_MHZ + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host: run control
  input  logic               start,
  input  row_addr_t          start_row,
  input  row_addr_t          last_row,
  input  logic               rm_enable,
  output logic               done,
  // host: code broadcast
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  logic [31:0]        prog_data,
  // host: local memory copy-in / copy-out
  input  logic               hm_we,
  input  logic [CIW-1:0]     hm_corelet,
  input  logic [LMEM_AW-1:0] hm_addr,
  input  logic [31:0]        hm_wdata,
  output logic [31:0]        hm_rdata,
  // DRAM channel (to the memory controller)
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output row_addr_t          cmd_row,
  output logic [UW-1:0]      cmd_unit,
  input  logic               rsp_valid,
  input  beat_t              rsp_data,
  // observation
  output logic [FW-1:0]      freq_mhz,
  output logic               ce,
  output logic               ev_empty,
  output logic               ev_full
);

  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned BW = $clog2(ROW_BYTES * 8 / CHAN_BITS);

  logic [N_CORELETS-1:0] dem_req, dem_hit, c_done;
  row_addr_t             dem_row  [N_CORELETS];
  slab_t                 dem_slab [N_CORELETS];
  logic [31:0]           c_rdata  [N_CORELETS];

  logic          pq_valid, pq_ready;
  row_addr_t     pq_row;
  logic [EW-1:0] pq_entry;
  logic          fill_valid;
  logic [EW-1:0] fill_entry;
  logic [BW-1:0] fill_beat;
  beat_t         fill_data;

  for (genvar i = 0; i < N_CORELETS; i++) begin : g_corelet
    corelet #(
      .CORELET_ID (i),
      .N_CORELETS (N_CORELETS),
      .LMEM_BYTES (LMEM_BYTES),
      .IMEM_BYTES (IMEM_BYTES)
    ) u_corelet (
      .clk       (clk),
      .rst_n     (rst_n),
      .ce        (ce),
      .start     (start),
      .done      (c_done[i]),
      .retire    (),
      .prog_we   (prog_we),
      .prog_addr (prog_addr),
      .prog_data (prog_data),
      .hm_we     (hm_we && hm_corelet == CIW'(i)),
      .hm_addr   (hm_addr),
      .hm_wdata  (hm_wdata),
      .hm_rdata  (c_rdata[i]),
      .pf_req    (dem_req[i]),
      .pf_row    (dem_row[i]),
      .pf_hit    (dem_hit[i]),
      .pf_slab   (dem_slab[i])
    );
  end

  assign hm_rdata = c_rdata[hm_corelet];
  assign done     = &c_done;

  prefetch_buffer #(
    .N_CORELETS (N_CORELETS),
    .ENTRIES    (ENTRIES)
  ) u_pbuf (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .start_row  (start_row),
    .last_row   (last_row),
    .dem_req    (dem_req),
    .dem_row    (dem_row),
    .dem_hit    (dem_hit),
    .dem_slab   (dem_slab),
    .pq_valid   (pq_valid),
    .pq_ready   (pq_ready),
    .pq_row     (pq_row),
    .pq_entry   (pq_entry),
    .fill_valid (fill_valid),
    .fill_entry (fill_entry),
    .fill_beat  (fill_beat),
    .fill_data  (fill_data),
    .ev_empty   (ev_empty),
    .ev_full    (ev_full)
  );

  row_fetch_unit #(
    .N_CORELETS (N_CORELETS),
    .ENTRIES    (ENTRIES)
  ) u_rfu (
    .clk        (clk),
    .rst_n      (rst_n),
    .pq_valid   (pq_valid),
    .pq_ready   (pq_ready),
    .pq_row     (pq_row),
    .pq_entry   (pq_entry),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd_row    (cmd_row),
    .cmd_unit   (cmd_unit),
    .rsp_valid  (rsp_valid),
    .rsp_data   (rsp_data),
    .fill_valid (fill_valid),
    .fill_entry (fill_entry),
    .fill_beat  (fill_beat),
    .fill_data  (fill_data)
  );

  rate_matcher #(
    .NOMINAL_MHZ (NOMINAL_MHZ)
  ) u_rm (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .enable    (rm_enable),
    .ev_empty  (ev_empty),
    .ev_full   (ev_full),
    .freq_mhz  (freq_mhz),
    .step_down (),
    .step_up   ()
  );

  dfs_clock_gen #(
    .BASE_MHZ (BASE_MHZ),
    .FW       (FW)
  ) u_dfs (
    .clk      (clk),
    .rst_n    (rst_n),
    .freq_mhz (freq_mhz),
    .ce       (ce)
  );

endmodule
