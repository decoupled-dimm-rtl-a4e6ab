// ddr_pkg: types and constants shared by the decoupled-DIMM memory system.
//
// The channel ("DDRx bus") and the on-DIMM rank bus both carry DDR3 command/address
// (BA0-BA2, A0-A13, RAS#, CAS#, WE#) plus per-rank CS#, CKE and ODT. Data is modelled at
// clock granularity: one 128-bit chunk per clock holds the two 64-bit beats of a DDR clock
// (rising-edge beat in bits 63:0, falling-edge beat in bits 127:64). A 64-byte burst of
// eight beats (BL=8) is therefore four chunks, on the channel and on the rank bus alike;
// only the clock that paces them differs. The sync-buffer's 32-bit command/address entry
// packs the 23 DDR3 command bits listed for it, plus the local rank number in spare bits.
package ddr_pkg;

  localparam int BEAT_W   = 64;               // x64 data path
  localparam int CHUNK_W  = 2 * BEAT_W;       // two beats per clock (DDR)
  localparam int BL       = 8;                // burst length in beats
  localparam int N_CHUNK  = BL / 2;           // clocks per burst
  localparam int LINE_W   = BL * BEAT_W;      // 512 bits = 64-byte cache line
  localparam int ROW_W    = 14;               // A0-A13
  localparam int BA_W     = 3;                // BA0-BA2
  localparam int AP_BIT   = 10;               // A10 = auto precharge on a column command

  typedef logic [CHUNK_W-1:0] chunk_t;
  typedef logic [LINE_W-1:0]  line_t;

  // Command/address pins shared by all ranks on a bus.
  typedef struct packed {
    logic [BA_W-1:0]  ba;
    logic [ROW_W-1:0] a;
    logic             ras_n;
    logic             cas_n;
    logic             we_n;
  } ddr_ca_t;

  // One sync-buffer command/address entry: 32 bits, 23 of them the DDR3 command set.
  typedef struct packed {
    logic [6:0]       rsvd;
    logic [1:0]       rank;     // local rank addressed by CS# (spare bits)
    logic             cs_n;
    logic             odt;
    logic             cke;
    logic             ras_n;
    logic             cas_n;
    logic             we_n;
    logic [ROW_W-1:0] a;
    logic [BA_W-1:0]  ba;
  } syb_cmd_entry_t;

  typedef enum logic [2:0] {
    CMD_NOP, CMD_ACT, CMD_RD, CMD_WR, CMD_PRE, CMD_REF, CMD_MRS, CMD_ZQ
  } ddr_cmd_e;

  // DDR3 truth table for RAS#/CAS#/WE# with CS# low.
  function automatic ddr_cmd_e decode_cmd(logic ras_n, logic cas_n, logic we_n);
    unique case ({ras_n, cas_n, we_n})
      3'b000:  return CMD_MRS;
      3'b001:  return CMD_REF;
      3'b010:  return CMD_PRE;
      3'b011:  return CMD_ACT;
      3'b100:  return CMD_WR;
      3'b101:  return CMD_RD;
      3'b110:  return CMD_ZQ;
      default: return CMD_NOP;
    endcase
  endfunction

  function automatic ddr_ca_t encode_cmd(ddr_cmd_e c, logic [BA_W-1:0] ba, logic [ROW_W-1:0] a);
    ddr_ca_t r;
    r.ba = ba;
    r.a  = a;
    unique case (c)
      CMD_MRS: {r.ras_n, r.cas_n, r.we_n} = 3'b000;
      CMD_REF: {r.ras_n, r.cas_n, r.we_n} = 3'b001;
      CMD_PRE: {r.ras_n, r.cas_n, r.we_n} = 3'b010;
      CMD_ACT: {r.ras_n, r.cas_n, r.we_n} = 3'b011;
      CMD_WR:  {r.ras_n, r.cas_n, r.we_n} = 3'b100;
      CMD_RD:  {r.ras_n, r.cas_n, r.we_n} = 3'b101;
      CMD_ZQ:  {r.ras_n, r.cas_n, r.we_n} = 3'b110;
      default: {r.ras_n, r.cas_n, r.we_n} = 3'b111;
    endcase
    return r;
  endfunction

  // Scheduler events reported by the memory controller, one pulse per occurrence.
  typedef struct packed {
    logic act;            // ACT issued
    logic rd;             // READ (auto precharge) issued
    logic wr;             // WRITE (auto precharge) issued
    logic rankbus_stall;  // a ready column command held back only by the rank-bus rule
    logic chbus_stall;    // a ready column command held back only by the channel data bus
    logic drain_on;       // write-drain mode entered
    logic pd_enter;       // a rank put into precharge power-down
    logic pd_exit;        // a rank woken from power-down
  } mc_ev_t;

  localparam ddr_ca_t CA_NOP = '{ba: '0, a: '0, ras_n: 1'b1, cas_n: 1'b1, we_n: 1'b1};

endpackage
