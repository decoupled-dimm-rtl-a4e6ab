// addr_map: physical cache-line address to DRAM coordinates.
//
// Cache-line interleaving with XOR-based bank mapping, the default configuration under
// which the decoupled DIMM was evaluated. Consecutive 64-byte lines go to consecutive
// channels, then DIMMs, then ranks, then banks, so a stream of lines spreads over every
// rank bus. Field order from the least significant line-address bit:
//   channel | DIMM | rank | bank | column (line within the row) | row
// The bank number is XORed with the low bits of the row (permutation-based interleaving),
// which spreads lines that conflict in one bank across banks. Within the row, the column
// sent to the device is the line index times the burst length (BL = 8), i.e. bits A2:A0 = 0.
// Combinational. Counts must be powers of two; a count of one gives a zero field.
module addr_map
  import ddr_pkg::*;
#(
  parameter int N_CH     = 2,     // channels
  parameter int N_DIMM   = 2,     // DIMMs per channel
  parameter int N_RANK   = 2,     // ranks per DIMM
  parameter int N_BANK   = 8,     // banks per rank
  parameter int COL_LN_W = 7,     // line-index bits within a row (1K columns / BL8)
  parameter int ADDR_W   = $clog2(N_CH) + $clog2(N_DIMM) + $clog2(N_RANK) + $clog2(N_BANK)
                           + COL_LN_W + ROW_W              // line address width
) (
  input  logic [ADDR_W-1:0]               line_addr,
  output logic [$clog2(N_CH+1)-1:0]       ch,
  output logic [$clog2(N_DIMM+1)-1:0]     dimm,
  output logic [$clog2(N_RANK+1)-1:0]     rank,
  output logic [BA_W-1:0]                 bank,
  output logic [ROW_W-1:0]                row,
  output logic [9:0]                      col
);
  localparam int CH_B   = $clog2(N_CH);
  localparam int DIMM_B = $clog2(N_DIMM);
  localparam int RANK_B = $clog2(N_RANK);
  localparam int BANK_B = $clog2(N_BANK);

  localparam int DIMM_S = CH_B;
  localparam int RANK_S = DIMM_S + DIMM_B;
  localparam int BANK_S = RANK_S + RANK_B;
  localparam int COL_S  = BANK_S + BANK_B;
  localparam int ROW_S  = COL_S + COL_LN_W;

  logic [ADDR_W-1:0] a;
  logic [BA_W-1:0]   bank_raw;
  assign a = line_addr;

  always_comb begin
    ch       = $bits(ch)'(a & ADDR_W'(N_CH - 1));
    dimm     = $bits(dimm)'((a >> DIMM_S) & ADDR_W'(N_DIMM - 1));
    rank     = $bits(rank)'((a >> RANK_S) & ADDR_W'(N_RANK - 1));
    bank_raw = BA_W'((a >> BANK_S) & ADDR_W'(N_BANK - 1));
    col      = 10'(((a >> COL_S) & ADDR_W'((1 << COL_LN_W) - 1)) << 3);
    row      = ROW_W'(a >> ROW_S);
    bank     = bank_raw ^ BA_W'(row & ROW_W'(N_BANK - 1));
  end

  initial assert (ADDR_W >= ROW_S + ROW_W) else $error("addr_map: ADDR_W too small");

endmodule
