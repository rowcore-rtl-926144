// tb_corelet: self-checking test of one corelet.
//
// A program is broadcast into the instruction store; each of the four
// contexts processes every fourth row (rows ctx, ctx+4, ...): it demand-fetches
// its slab of the row into local memory, sums the 16 words and counts the words
// with bit 7 set (a data-dependent branch), then stores its sum, count,
// corelet id, corelet count, sum*count and sum-count.  The testbench plays the
// prefetch buffer: rows become available one by one, so some fetches stall and
// are replayed.  Results are compared with values computed here from
// tb_data_pkg.  A second run with rows available from the start checks the
// issue rate: with four contexts ready the corelet retires about one
// instruction per cycle.
module tb_corelet;
  import rowcore_pkg::*;
  import tb_data_pkg::*;

  localparam int ID    = 5;
  localparam int NCL   = 32;
  localparam int NROWS = 12;

  logic clk = 0, rst_n = 0, ce = 1, start = 0;
  logic done, retire;
  logic prog_we = 0; logic [9:0] prog_addr = '0; logic [31:0] prog_data = '0;
  logic hm_we = 0; logic [9:0] hm_addr = '0; logic [31:0] hm_wdata = '0, hm_rdata;
  logic pf_req, pf_hit; row_addr_t pf_row; slab_t pf_slab;

  int checks = 0, failures = 0;
  int avail = 0;          // rows [0, avail) are present
  int stalls = 0, retired = 0, cycles = 0;

  corelet #(.CORELET_ID(ID), .N_CORELETS(NCL)) dut (.*);

  always #5 clk = ~clk;

  assign pf_hit = pf_req && (int'(pf_row) < avail);
  always_comb
    for (int k = 0; k < 16; k++) pf_slab[32*k +: 32] = input_word(int'(pf_row), ID * 16 + k);

  always @(posedge clk) begin
    if (pf_req && !pf_hit) stalls++;
    if (retire) retired++;
  end

  logic [31:0] prog [33];
  initial begin
    prog[0]  = enc_i(OP_ID, 1, 0, 1);
    prog[1]  = enc_i(OP_ADDI, 2, 0, 0);
    prog[2]  = enc_i(OP_ADDI, 3, 0, 0);
    prog[3]  = enc_i(OP_SLLI, 4, 1, 6);
    prog[4]  = enc_i(OP_ADDI, 4, 4, 2048);
    prog[5]  = enc_i(OP_SLTI, 5, 1, NROWS);       // loop:
    prog[6]  = enc_b(OP_BEQ, 5, 0, 14);           // -> end (20)
    prog[7]  = enc(OP_FETCH, 0, 1, 4, 0);
    prog[8]  = enc_i(OP_ADDI, 6, 0, 0);
    prog[9]  = enc_r(OP_ADD, 7, 4, 6);            // inner:
    prog[10] = enc_i(OP_LW, 7, 7, 0);
    prog[11] = enc_r(OP_ADD, 2, 2, 7);
    prog[12] = enc_i(OP_ANDI, 7, 7, 128);
    prog[13] = enc_b(OP_BEQ, 7, 0, 2);
    prog[14] = enc_i(OP_ADDI, 3, 3, 1);
    prog[15] = enc_i(OP_ADDI, 6, 6, 4);
    prog[16] = enc_i(OP_SLTI, 7, 6, 64);
    prog[17] = enc_b(OP_BNE, 7, 0, -8);
    prog[18] = enc_i(OP_ADDI, 1, 1, 4);
    prog[19] = enc(OP_JAL, 0, 0, 0, -14);
    prog[20] = enc_i(OP_ID, 5, 0, 1);              // end:
    prog[21] = enc_i(OP_SLLI, 5, 5, 5);
    prog[22] = enc(OP_SW, 0, 5, 2, 0);
    prog[23] = enc(OP_SW, 0, 5, 3, 4);
    prog[24] = enc_i(OP_ID, 6, 0, 0);
    prog[25] = enc(OP_SW, 0, 5, 6, 8);
    prog[26] = enc_i(OP_ID, 6, 0, 2);
    prog[27] = enc(OP_SW, 0, 5, 6, 12);
    prog[28] = enc_r(OP_MUL, 6, 2, 3);
    prog[29] = enc(OP_SW, 0, 5, 6, 16);
    prog[30] = enc_r(OP_SUB, 6, 2, 3);
    prog[31] = enc(OP_SW, 0, 5, 6, 20);
    prog[32] = enc(OP_HALT, 0, 0, 0, 0);
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_and_check(int release_every);
    int t0;
    avail = (release_every == 0) ? NROWS : 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cycles; retired = 0;
    while (!done) begin
      @(negedge clk);
      if (release_every != 0 && (cycles - t0) % release_every == 0 && avail < NROWS) avail++;
    end
    for (int c = 0; c < 4; c++) begin
      logic [31:0] sum, cnt;
      sum = 0; cnt = 0;
      for (int r = c; r < NROWS; r += 4)
        for (int k = 0; k < 16; k++) begin
          sum += input_word(r, ID * 16 + k);
          if (input_word(r, ID * 16 + k) & 32'h80) cnt++;
        end
      hm_addr = 10'(c * 8);     #1 check($sformatf("ctx%0d sum", c), hm_rdata, sum);
      hm_addr = 10'(c * 8 + 1); #1 check($sformatf("ctx%0d count", c), hm_rdata, cnt);
      hm_addr = 10'(c * 8 + 2); #1 check($sformatf("ctx%0d id", c), hm_rdata, ID);
      hm_addr = 10'(c * 8 + 3); #1 check($sformatf("ctx%0d ncl", c), hm_rdata, NCL);
      hm_addr = 10'(c * 8 + 4); #1 check($sformatf("ctx%0d mul", c), hm_rdata, sum * cnt);
      hm_addr = 10'(c * 8 + 5); #1 check($sformatf("ctx%0d sub", c), hm_rdata, sum - cnt);
      // the slab of the last row this context fetched sits in its line
      for (int k = 0; k < 16; k++) begin
        int lr;
        lr = c + 4 * ((NROWS - 1 - c) / 4);
        hm_addr = 10'(512 + c * 16 + k); #1
        check($sformatf("ctx%0d line word %0d", c, k), hm_rdata, input_word(lr, ID * 16 + k));
      end
    end
    $display("run (release every %0d): %0d cycles, %0d retired, %0d fetch stalls",
             release_every, cycles - t0, retired, stalls);
  endtask

  always @(posedge clk) cycles++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 33; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0;

    // run 1: rows trickle in, fetches stall and replay
    run_and_check(60);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no fetch stall was exercised"); end

    // run 2: all rows present; four contexts keep the pipeline full
    begin
      int t0, n;
      t0 = cycles;
      run_and_check(0);
      n = cycles - t0;
      checks++;
      if (n > retired + retired / 10 + 20) begin
        failures++;
        $display("FAIL: issue rate too low, %0d cycles for %0d instructions", n, retired);
      end
    end

    // run 3: clock enable at half rate halves the progress
    begin
      int t0, n1;
      t0 = cycles;
      fork
        run_and_check(0);
        forever @(negedge clk) ce = ~ce;
      join_any
      disable fork;
      ce = 1;
      n1 = cycles - t0;
      checks++;
      if (n1 < 2 * retired - 20) begin
        failures++;
        $display("FAIL: clock enable ignored (%0d cycles)", n1);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
