// tb_kernels_pkg: corelet programs for the machine-learning kernels used by
// the system testbenches, and their reference results.
//
// variance (also yields count): the input is a table of 8-byte records
// (label word, value word), laid out word-interleaved so that each corelet's
// 64-byte slab of a row holds 8 consecutive records.  For each record the
// kernel does bin = label & 15, x = value & 255 and updates, in the context's
// private region of local memory, count[bin] += 1, sum[bin] += x and
// sumsq[bin] += x*x (data-dependent indirect accesses).  Outliers (x >= 248)
// also take a data-dependent slow path that adds the popcount of the label,
// counted bit by bit, to a per-context total: corelets therefore do unequal
// work per row, as real kernels with data-dependent branches do.  Context c processes
// rows first+c, first+c+4, ..., so every row is demand-fetched exactly once per
// corelet.  The contexts pass a turn word around so that each corelet
// demand-fetches its rows in increasing order, which the prefetch buffer's
// flow control relies on.  The host presets local-memory bytes 4032/4036/4040
// with the first row, the end row (exclusive) and the first row again (turn); the partial results of context c are at bytes
// c*256 (count), c*256+64 (sum), c*256+128 (sumsq) and c*256+192 (outlier total); the host adds the four
// contexts and all corelets (the final Reduce).
//
// nbayes: the class-conditional counting of naive Bayes, on slab-interleaved
// records (one 64-byte record per slab); described with the program below.
package tb_kernels_pkg;
  import rowcore_pkg::*;
  import tb_data_pkg::*;

  localparam int VAR_LEN   = 55;
  localparam int PARAM_LO  = 4032 / 4;   // word index of "first row"
  localparam int PARAM_HI  = 4036 / 4;   // word index of "end row"
  localparam int PARAM_TURN = 4040 / 4;  // word index of "next row to fetch"
  localparam int NBINS     = 16;

  function automatic logic [31:0] variance_prog(int i);
    case (i)
      0:  return enc_i(OP_ID,   2, 0, 1);        // ctx
      1:  return enc_i(OP_SLLI, 5, 2, 8);        // state base = ctx*256
      2:  return enc_i(OP_ADDI, 6, 5, 0);
      3:  return enc_i(OP_ADDI, 7, 5, 196);
      4:  return enc(OP_SW, 0, 6, 0, 0);         // zero the state
      5:  return enc_i(OP_ADDI, 6, 6, 4);
      6:  return enc_b(OP_BNE, 6, 7, -2);
      7:  return enc_i(OP_LW,   1, 0, 4032);     // first row
      8:  return enc_r(OP_ADD,  1, 1, 2);        // row = first + ctx
      9:  return enc_i(OP_SLLI, 4, 2, 6);
      10: return enc_i(OP_ADDI, 4, 4, 2048);     // slab line = 2048 + ctx*64
      11: return enc_i(OP_LW,   2, 0, 4036);     // loop: end row
      12: return enc_b(OP_BGE,  1, 2, 42);       //   -> halt
      13: return enc_i(OP_LW,   3, 0, 4040);     //   wait for this row's turn:
      14: return enc_b(OP_BNE,  3, 1, -1);       //   rows are fetched in order
      15: return enc(OP_FETCH, 0, 1, 4, 0);      //   demand fetch of the slab
      16: return enc_i(OP_ADDI, 3, 1, 1);
      17: return enc(OP_SW, 0, 0, 3, 4040);      //   pass the turn on
      18: return enc_i(OP_ADDI, 6, 4, 0);        //   record pointer
      19: return enc_i(OP_LW,   2, 6, 0);        // record: label
      20: return enc_i(OP_ANDI, 2, 2, NBINS - 1);
      21: return enc_i(OP_SLLI, 2, 2, 2);
      22: return enc_r(OP_ADD,  2, 2, 5);        //   &count[bin]
      23: return enc_i(OP_LW,   3, 2, 0);
      24: return enc_i(OP_ADDI, 3, 3, 1);
      25: return enc(OP_SW, 0, 2, 3, 0);
      26: return enc_i(OP_LW,   7, 6, 4);        //   value
      27: return enc_i(OP_ANDI, 7, 7, 255);
      28: return enc_i(OP_LW,   3, 2, 64);
      29: return enc_r(OP_ADD,  3, 3, 7);
      30: return enc(OP_SW, 0, 2, 3, 64);
      31: return enc_r(OP_MUL,  7, 7, 7);
      32: return enc_i(OP_LW,   3, 2, 128);
      33: return enc_r(OP_ADD,  3, 3, 7);
      34: return enc(OP_SW, 0, 2, 3, 128);
      35: return enc_i(OP_LW,   7, 6, 4);        //   outlier (value >= 248)?
      36: return enc_i(OP_ANDI, 7, 7, 255);
      37: return enc_i(OP_SLTI, 7, 7, 248);
      38: return enc_b(OP_BNE,  7, 0, 10);       //   no -> next
      39: return enc_i(OP_LW,   2, 6, 0);        //   popcount of the label
      40: return enc_i(OP_ADDI, 3, 0, 0);
      41: return enc_i(OP_ANDI, 7, 2, 1);
      42: return enc_r(OP_ADD,  3, 3, 7);
      43: return enc_i(OP_SRLI, 2, 2, 1);
      44: return enc_b(OP_BNE,  2, 0, -3);
      45: return enc_i(OP_LW,   7, 5, 192);
      46: return enc_r(OP_ADD,  7, 7, 3);
      47: return enc(OP_SW, 0, 5, 7, 192);
      48: return enc_i(OP_ADDI, 6, 6, 8);        // next record
      49: return enc_r(OP_SUB,  7, 6, 4);
      50: return enc_i(OP_SLTI, 7, 7, 64);
      51: return enc_b(OP_BNE,  7, 0, -32);
      52: return enc_i(OP_ADDI, 1, 1, 4);
      53: return enc(OP_JAL, 0, 0, 0, -42);     // next row
      54: return enc(OP_HALT, 0, 0, 0, 0);
      default: return '0;
    endcase
  endfunction

  // reference partial result of one corelet: kind 0 count, 1 sum, 2 sumsq
  // (per bin), 3 outlier popcount total (bin ignored)
  function automatic logic [31:0] variance_ref(int corelet, int kind, int bin, int first, int last_excl);
    logic [31:0] acc;
    acc = 0;
    for (int r = first; r < last_excl; r++)
      for (int j = 0; j < 8; j++) begin
        logic [31:0] label, x;
        label = input_word(r, corelet * 16 + 2 * j);
        x     = input_word(r, corelet * 16 + 2 * j + 1) & 32'hFF;
        if (kind == 3) begin
          if (x >= 248) acc += 32'($countones(label));
        end else if (int'(label & 32'(NBINS - 1)) == bin)
          acc += (kind == 0) ? 32'd1 : (kind == 1) ? x : x * x;
      end
    return acc;
  endfunction

  // naive Bayes (class-conditional counting): slab-interleaved 64-byte
  // records, one per slab: word 0 holds the year, words 1..15 the 15
  // dimensions.  class = (year & 1023) >= 512; for every dimension d the
  // kernel increments count[class][d][x & 3], and it counts records per class.
  // State of context c at byte c*512: count[class][d-1][bin] at
  // class*240 + (d-1)*16 + bin*4, class totals at 480 + class*4.  Rows are
  // shared out and fetched in order as in the variance kernel (same
  // parameter words).
  localparam int NB_LEN = 48;

  function automatic logic [31:0] nbayes_prog(int i);
    case (i)
      0:  return enc_i(OP_ID,   2, 0, 1);        // ctx
      1:  return enc_i(OP_SLLI, 5, 2, 9);        // state base = ctx*512
      2:  return enc_i(OP_ADDI, 6, 5, 0);
      3:  return enc_i(OP_ADDI, 7, 5, 488);
      4:  return enc(OP_SW, 0, 6, 0, 0);         // zero the state
      5:  return enc_i(OP_ADDI, 6, 6, 4);
      6:  return enc_b(OP_BNE, 6, 7, -2);
      7:  return enc_i(OP_LW,   1, 0, 4032);     // first row
      8:  return enc_r(OP_ADD,  1, 1, 2);        // row = first + ctx
      9:  return enc_i(OP_SLLI, 4, 2, 6);
      10: return enc_i(OP_ADDI, 4, 4, 2048);     // slab line = 2048 + ctx*64
      11: return enc_i(OP_LW,   2, 0, 4036);     // loop: end row
      12: return enc_b(OP_BGE,  1, 2, 35);       //   -> halt
      13: return enc_i(OP_LW,   3, 0, 4040);     //   wait for this row's turn
      14: return enc_b(OP_BNE,  3, 1, -1);
      15: return enc(OP_FETCH, 0, 1, 4, 0);      //   demand fetch of the record
      16: return enc_i(OP_ADDI, 3, 1, 1);
      17: return enc(OP_SW, 0, 0, 3, 4040);      //   pass the turn on
      18: return enc_i(OP_ID,   5, 0, 1);
      19: return enc_i(OP_SLLI, 5, 5, 9);        //   state base
      20: return enc_i(OP_LW,   2, 4, 0);        //   year
      21: return enc_i(OP_ANDI, 2, 2, 1023);
      22: return enc_i(OP_SLTI, 2, 2, 512);
      23: return enc_i(OP_XORI, 2, 2, 1);        //   class = year >= 512
      24: return enc_i(OP_SLLI, 3, 2, 2);
      25: return enc_r(OP_ADD,  3, 3, 5);
      26: return enc_i(OP_LW,   7, 3, 480);      //   class total += 1
      27: return enc_i(OP_ADDI, 7, 7, 1);
      28: return enc(OP_SW, 0, 3, 7, 480);
      29: return enc_i(OP_ADDI, 3, 0, 240);
      30: return enc_r(OP_MUL,  2, 2, 3);
      31: return enc_r(OP_ADD,  5, 5, 2);        //   class block
      32: return enc_i(OP_ADDI, 6, 4, 4);        //   dimension pointer
      33: return enc_i(OP_LW,   7, 6, 0);        // dimension: value
      34: return enc_i(OP_ANDI, 7, 7, 3);
      35: return enc_i(OP_SLLI, 7, 7, 2);
      36: return enc_r(OP_ADD,  7, 7, 5);        //   &count[class][d][bin]
      37: return enc_i(OP_LW,   3, 7, 0);
      38: return enc_i(OP_ADDI, 3, 3, 1);
      39: return enc(OP_SW, 0, 7, 3, 0);
      40: return enc_i(OP_ADDI, 5, 5, 16);
      41: return enc_i(OP_ADDI, 6, 6, 4);
      42: return enc_r(OP_SUB,  7, 6, 4);
      43: return enc_i(OP_SLTI, 7, 7, 64);
      44: return enc_b(OP_BNE,  7, 0, -11);
      45: return enc_i(OP_ADDI, 1, 1, 4);
      46: return enc(OP_JAL, 0, 0, 0, -35);     // next row
      47: return enc(OP_HALT, 0, 0, 0, 0);
      default: return '0;
    endcase
  endfunction

  // reference: the count at byte offset off (0 .. 487) of the summed state of
  // one corelet
  function automatic logic [31:0] nbayes_ref(int corelet, int off, int first, int last_excl);
    logic [31:0] acc;
    acc = 0;
    for (int r = first; r < last_excl; r++) begin
      int cls;
      cls = ((input_word(r, corelet * 16) & 32'd1023) >= 512) ? 1 : 0;
      if (off == 480 + cls * 4) acc++;
      for (int d = 1; d < 16; d++)
        if (off == cls * 240 + (d - 1) * 16 + int'(input_word(r, corelet * 16 + d) & 32'd3) * 4) acc++;
    end
    return acc;
  endfunction

endpackage
