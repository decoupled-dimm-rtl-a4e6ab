// syb_dev_ctrl_if: the sync-buffer's control interface with the DRAM devices (component D).
//
// At every device clock edge (the bus clock edge that ends a cycle with dev_tick high) it
// takes the entry waiting in the command buffer, if any, and drives it on the rank bus for
// one whole device clock: BA/A/RAS#/CAS#/WE# to all ranks and CS# low for the addressed rank
// only. Without an entry it drives NOP (all CS# high). CKE and ODT levels sampled by the bus
// control interface are forwarded at the same edges.
// Timing: a command on the channel in a bus clock with device phase p reaches the devices at
// the start of the next device clock if p < M-1, and one device clock later if p = M-1
// (the entry is written at the very edge at which the devices' clock rises, and is relayed
// at the following one). With M = 2 and a command placed in phase 0 this is the one device
// clock of command delay the document shows.
// rd_evt / wr_evt pulse in the first bus clock of the device clock in which a READ / WRITE
// is on the rank bus; the two data interfaces time their transfers from these pulses.
module syb_dev_ctrl_if
  import ddr_pkg::*;
#(
  parameter int N_RANK = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dev_tick,
  input  logic              ent_valid,
  input  syb_cmd_entry_t    ent,
  output logic              ent_re,
  input  logic [N_RANK-1:0] cke_lvl,
  input  logic [N_RANK-1:0] odt_lvl,
  output ddr_ca_t           dev_ca,
  output logic [N_RANK-1:0] dev_cs_n,
  output logic [N_RANK-1:0] dev_cke,
  output logic [N_RANK-1:0] dev_odt,
  output logic              rd_evt,
  output logic              wr_evt
);
  ddr_cmd_e cmd;
  assign cmd    = decode_cmd(ent.ras_n, ent.cas_n, ent.we_n);
  assign ent_re = dev_tick && ent_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dev_ca   <= CA_NOP;
      dev_cs_n <= '1;
      dev_cke  <= '1;
      dev_odt  <= '0;
      rd_evt   <= 1'b0;
      wr_evt   <= 1'b0;
    end else begin
      rd_evt <= 1'b0;
      wr_evt <= 1'b0;
      if (dev_tick) begin
        dev_cke <= cke_lvl;
        dev_odt <= odt_lvl;
        if (ent_valid) begin
          dev_ca.ba    <= ent.ba;
          dev_ca.a     <= ent.a;
          dev_ca.ras_n <= ent.ras_n;
          dev_ca.cas_n <= ent.cas_n;
          dev_ca.we_n  <= ent.we_n;
          for (int r = 0; r < N_RANK; r++)
            dev_cs_n[r] <= !(ent.rank == 2'(r));
          rd_evt <= (cmd == CMD_RD);
          wr_evt <= (cmd == CMD_WR);
        end else begin
          dev_ca   <= CA_NOP;
          dev_cs_n <= '1;
        end
      end
    end
  end

endmodule
