// tb_data_pkg: the input data set used by the testbenches.
//
// Word w (0 .. 511 for a 2 KB row) of DRAM row r holds input_word(r, w), a
// fixed integer hash, so that the DRAM model can produce any row on demand and
// the checkers can compute the expected results independently of the design.
package tb_data_pkg;

  function automatic logic [31:0] input_word(int unsigned row, int unsigned word);
    logic [31:0] x;
    x = 32'(row) * 32'h9E37_79B1 ^ 32'(word) * 32'h85EB_CA6B ^ 32'h1234_5678;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 13);
    return x;
  endfunction

endpackage
