// syb_bus_ctrl_if: the sync-buffer's DDRx bus control interface (component B).
//
// Watches the channel command/address pins and the CS#/CKE/ODT pins of the ranks behind
// this sync-buffer. When one of its ranks is selected (CS# low) with a command other than
// NOP, it forms a 32-bit command/address entry (BA, A, RAS#, CAS#, WE#, CKE, ODT, CS# and the
// local rank number) and asks the command buffer to store it at the end of the same bus
// clock; that store is the one bus clock of command delay. CKE and ODT are levels, not
// commands: they are sampled every bus clock into per-rank registers that the device-side
// control interface relays.
// Commands selecting ranks of other DIMMs (all local CS# high) are ignored. At most one
// local CS# may be low at a time (assertion).
module syb_bus_ctrl_if
  import ddr_pkg::*;
#(
  parameter int N_RANK = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ddr_ca_t           bus_ca,
  input  logic [N_RANK-1:0] bus_cs_n,
  input  logic [N_RANK-1:0] bus_cke,
  input  logic [N_RANK-1:0] bus_odt,
  output logic              ent_we,
  output syb_cmd_entry_t    ent_wdata,
  output logic [N_RANK-1:0] cke_lvl,
  output logic [N_RANK-1:0] odt_lvl
);
  logic     sel, sel_cke, sel_odt;
  logic [1:0] rank;
  ddr_cmd_e cmd;

  always_comb begin
    sel     = 1'b0;
    rank    = '0;
    sel_cke = 1'b0;
    sel_odt = 1'b0;
    for (int r = 0; r < N_RANK; r++)
      if (!bus_cs_n[r]) begin
        sel     = 1'b1;
        rank    = 2'(r);
        sel_cke = bus_cke[r];
        sel_odt = bus_odt[r];
      end
  end

  assign cmd    = decode_cmd(bus_ca.ras_n, bus_ca.cas_n, bus_ca.we_n);
  assign ent_we = sel && (cmd != CMD_NOP);

  always_comb begin
    ent_wdata       = '0;
    ent_wdata.rank  = rank;
    ent_wdata.cs_n  = 1'b0;
    ent_wdata.odt   = sel_odt;
    ent_wdata.cke   = sel_cke;
    ent_wdata.ras_n = bus_ca.ras_n;
    ent_wdata.cas_n = bus_ca.cas_n;
    ent_wdata.we_n  = bus_ca.we_n;
    ent_wdata.a     = bus_ca.a;
    ent_wdata.ba    = bus_ca.ba;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cke_lvl <= '1;
      odt_lvl <= '0;
    end else begin
      cke_lvl <= bus_cke;
      odt_lvl <= bus_odt;
    end
  end

  a_one_cs: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(~bus_cs_n))
    else $error("syb_bus_ctrl_if: more than one rank selected");

  initial assert (N_RANK >= 1 && N_RANK <= 4) else $error("syb_bus_ctrl_if: 1 to 4 ranks");

endmodule
