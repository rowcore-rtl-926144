// tb_row_fetch_unit: self-checking test of the row fetch unit against the
// DRAM channel model, at the full row size (32 slabs, 16 transfer units,
// 128 beats per row).
//
// Three row prefetches are queued back to back (the third while the FIFO is
// full), with random back-pressure on the command channel in the second half.
// Checks: commands walk units 0..15 of each row in request order; every beat
// of every row is written exactly once, to the right entry and beat index,
// with the row's data; each row opens the DRAM row once; and with no
// back-pressure a row arrives within the row-miss latency plus one beat per
// cycle (plus the model's one idle cycle per unit).
module tb_row_fetch_unit;
  import rowcore_pkg::*;
  import tb_data_pkg::*;

  localparam int UNITS = 16, BEATS = 128, LAT = 27;

  logic clk = 0, rst_n = 0;
  logic pq_valid = 0, pq_ready;
  row_addr_t pq_row = '0;
  logic [3:0] pq_entry = '0;
  logic cmd_valid, cmd_ready, cmd_ready_m;
  row_addr_t cmd_row;
  logic [3:0] cmd_unit;
  logic rsp_valid;
  beat_t rsp_data;
  logic fill_valid;
  logic [3:0] fill_entry;
  logic [6:0] fill_beat;
  beat_t fill_data;
  int unsigned n_row_miss, n_cmds;
  logic bp = 0;          // random back-pressure on
  logic stall_now = 0;

  row_fetch_unit dut (
    .clk, .rst_n, .pq_valid, .pq_ready, .pq_row, .pq_entry,
    .cmd_valid, .cmd_ready, .cmd_row, .cmd_unit,
    .rsp_valid, .rsp_data, .fill_valid, .fill_entry, .fill_beat, .fill_data
  );

  dram_model #(.UW(4)) mem (
    .clk, .rst_n, .gap(0), .cmd_valid(cmd_valid && !stall_now), .cmd_ready(cmd_ready_m),
    .cmd_row, .cmd_unit, .rsp_valid, .rsp_data, .n_row_miss, .n_cmds
  );
  assign cmd_ready = cmd_ready_m && !stall_now;

  always #5 clk = ~clk;
  always @(negedge clk) stall_now <= bp && ($urandom_range(0, 2) == 0);

  int checks = 0, failures = 0, cyc = 0;
  int rows [3] = '{7, 8, 20};
  int ents [3] = '{3, 4, 5};
  int beats_seen [3];
  int exp_unit = 0, exp_req = 0;
  int t_first_cmd = -1, t_row0_done = -1;

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready) begin
      checks++;
      if (int'(cmd_row) != rows[exp_req] || int'(cmd_unit) != exp_unit) begin
        failures++;
        $display("FAIL: command row %0d unit %0d, expected row %0d unit %0d",
                 cmd_row, cmd_unit, rows[exp_req], exp_unit);
      end
      if (t_first_cmd < 0) t_first_cmd = cyc;
      exp_unit++;
      if (exp_unit == UNITS) begin exp_unit = 0; exp_req++; end
    end
    if (fill_valid) begin
      int r;
      r = -1;
      for (int j = 0; j < 3; j++) if (int'(fill_entry) == ents[j]) r = j;
      checks++;
      if (r < 0) begin
        failures++; $display("FAIL: fill to unexpected entry %0d", fill_entry);
      end else begin
        if (int'(fill_beat) != beats_seen[r]) begin
          failures++;
          $display("FAIL: entry %0d beat %0d, expected beat %0d", fill_entry, fill_beat, beats_seen[r]);
        end
        for (int k = 0; k < 4; k++)
          if (fill_data[32*k +: 32] !== input_word(rows[r], int'(fill_beat) * 4 + k)) begin
            failures++;
            $display("FAIL: row %0d beat %0d word %0d data", rows[r], fill_beat, k);
            break;
          end
        beats_seen[r]++;
        if (r == 0 && beats_seen[0] == BEATS) t_row0_done = cyc;
      end
    end
  end

  initial begin
    beats_seen = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 3; j++) begin
      @(negedge clk);
      pq_valid = 1; pq_row = row_addr_t'(rows[j]); pq_entry = 4'(ents[j]);
      @(posedge clk);
      while (!pq_ready) @(posedge clk);
      if (j == 1) bp = 1;
    end
    @(negedge clk) pq_valid = 0;
    while (beats_seen[2] < BEATS) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (beats_seen[j] != BEATS) begin failures++; $display("FAIL: row %0d got %0d beats", rows[j], beats_seen[j]); end
    end
    checks++;
    if (n_row_miss != 3) begin failures++; $display("FAIL: %0d row opens, expected 3", n_row_miss); end
    checks++;
    if (t_row0_done - t_first_cmd > LAT + BEATS + UNITS + 4) begin
      failures++;
      $display("FAIL: first row took %0d cycles", t_row0_done - t_first_cmd);
    end
    $display("first row: %0d cycles from first command to last beat", t_row0_done - t_first_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
