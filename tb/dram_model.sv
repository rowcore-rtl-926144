// dram_model: behavioural model of one die-stacked DRAM channel behind its
// memory controller, for simulation only (not synthesizable hardware).
//
// Accepts read commands for one 128-byte transfer unit of a row (cmd_row,
// cmd_unit) into a queue of QDEPTH commands (the controller's queue), and
// returns each unit as eight 128-bit beats, in command order.  A command to a
// row other than the open one waits ROW_MISS_LAT cycles (precharge, activate
// and CAS: 9 + 9 + 9 channel cycles by default); a command to the open row
// streams without a gap.  gap idle cycles can be inserted after every beat to
// model a slower memory.  Row contents come from tb_data_pkg::input_word.
module dram_model
  import rowcore_pkg::*;
#(
  parameter int unsigned UW           = 4,
  parameter int unsigned QDEPTH       = 16,
  parameter int unsigned ROW_MISS_LAT = 27
) (
  input  int unsigned   gap,        // idle cycles after each beat
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  row_addr_t     cmd_row,
  input  logic [UW-1:0] cmd_unit,
  output logic          rsp_valid,
  output beat_t         rsp_data,
  output int unsigned   n_row_miss,
  output int unsigned   n_cmds
);
  import tb_data_pkg::*;

  row_addr_t     q_row  [$];
  int unsigned   q_unit [$];
  row_addr_t     open_row;
  logic          open_valid;
  int            wait_ctr, beat, gap_ctr;
  logic          busy;
  row_addr_t     cur_row;
  int unsigned   cur_unit;

  assign cmd_ready = (q_row.size() < QDEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_row.delete(); q_unit.delete();
      open_valid <= 1'b0; open_row <= '0;
      busy <= 1'b0; wait_ctr <= 0; beat <= 0; gap_ctr <= 0;
      rsp_valid <= 1'b0; rsp_data <= '0;
      n_row_miss <= 0; n_cmds <= 0;
      cur_row <= '0; cur_unit <= 0;
    end else begin
      rsp_valid <= 1'b0;
      if (cmd_valid && cmd_ready) begin
        q_row.push_back(cmd_row);
        q_unit.push_back(32'(cmd_unit));
        n_cmds <= n_cmds + 1;
      end
      if (!busy) begin
        if (q_row.size() > 0) begin
          cur_row  <= q_row[0];
          cur_unit <= q_unit[0];
          if (!open_valid || open_row != q_row[0]) begin
            wait_ctr   <= ROW_MISS_LAT;
            n_row_miss <= n_row_miss + 1;
          end else begin
            wait_ctr <= 0;
          end
          open_row   <= q_row[0];
          open_valid <= 1'b1;
          void'(q_row.pop_front());
          void'(q_unit.pop_front());
          busy <= 1'b1;
          beat <= 0;
          gap_ctr <= 0;
        end
      end else if (wait_ctr > 0) begin
        wait_ctr <= wait_ctr - 1;
      end else if (gap_ctr > 0) begin
        gap_ctr <= gap_ctr - 1;
      end else begin
        rsp_valid <= 1'b1;
        for (int k = 0; k < 4; k++)
          rsp_data[32*k +: 32] <= input_word(cur_row, cur_unit * 32 + 32'(beat) * 4 + 32'(k));
        gap_ctr <= int'(gap);
        if (beat == 7) busy <= 1'b0;
        beat <= beat + 1;
      end
    end
  end

endmodule
