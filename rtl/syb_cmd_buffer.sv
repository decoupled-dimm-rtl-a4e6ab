// syb_cmd_buffer: the sync-buffer's command/address buffer (component G).
//
// One 32-bit entry (ddr_pkg::syb_cmd_entry_t) that caches a command captured from the
// channel until the device-side control interface relays it at the next device clock.
// One entry is enough because the memory controller separates consecutive commands to the
// ranks behind one sync-buffer by at least one device clock (M bus clocks): the entry is
// always drained by the time the next command arrives. A write while the entry is full and
// not being drained is a scheduling error; it is flagged on `overflow` (sticky) and by an
// assertion, and the newer command overwrites the older.
// Timing: written at the end of the bus clock the command is on the channel; read
// combinationally; cleared by `re` at a bus clock edge.
module syb_cmd_buffer
  import ddr_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           we,
  input  syb_cmd_entry_t wdata,
  input  logic           re,
  output logic           valid,
  output syb_cmd_entry_t rdata,
  output logic           overflow
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= 1'b0;
      rdata    <= '0;
      overflow <= 1'b0;
    end else begin
      if (we) begin
        rdata <= wdata;
        valid <= 1'b1;
        if (valid && !re) overflow <= 1'b1;
      end else if (re) begin
        valid <= 1'b0;
      end
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) !(we && valid && !re))
    else $error("syb_cmd_buffer: command overwritten before it was relayed");

endmodule
