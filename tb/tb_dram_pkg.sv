// tb_dram_pkg: helpers shared by the DRAM rank model and the testbenches.
// default_line() gives the contents of a line that has never been written, as a function of
// where it lives, so a reader can predict it without asking the model.
package tb_dram_pkg;
  import ddr_pkg::*;

  function automatic line_t default_line(int ch, int dimm, int rank, int bank, int row, int col);
    line_t l;
    for (int w = 0; w < LINE_W / 32; w++)
      l[w*32 +: 32] = 32'(((ch * 4 + dimm) * 4 + rank) * 8 + bank) * 32'h0100_0193
                      ^ (32'(row) << 10) ^ 32'(col) ^ (32'(w) * 32'h9E37_79B9);
    return l;
  endfunction

  // Deterministic pseudo-random line for write data.
  function automatic line_t pattern_line(int seed);
    line_t l;
    for (int w = 0; w < LINE_W / 32; w++)
      l[w*32 +: 32] = 32'(seed) * 32'h2545_F491 + 32'(w) * 32'h6C8E_9CF5 + 32'h1234_5678;
    return l;
  endfunction
endpackage
