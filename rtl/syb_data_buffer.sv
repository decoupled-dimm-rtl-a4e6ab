// syb_data_buffer: the sync-buffer's data buffer (component F).
//
// A read entry (RD) and a write entry (WR), each 64 bytes, as in the document. Each entry
// is an array of four 128-bit chunks (one chunk = the two beats of one DDR clock). The RD
// entry is written by the device-side data interface and read by the bus-side one; the WR
// entry the other way round. Writes happen at a bus clock edge; reads are combinational, so
// a chunk written at an edge is visible from that edge on. Because an incoming burst is
// pipelined with the outgoing one, a chunk may be read out while later chunks of the same
// burst are still arriving; the controller's timing rules keep two bursts from colliding
// on an entry, so no entry needs more than one line.
module syb_data_buffer
  import ddr_pkg::*;
(
  input  logic                       clk,
  // RD entry: device side writes, bus side reads
  input  logic                       rd_we,
  input  logic [1:0]                 rd_widx,
  input  chunk_t                     rd_wdata,
  input  logic [1:0]                 rd_ridx,
  output chunk_t                     rd_rdata,
  // WR entry: bus side writes, device side reads
  input  logic                       wr_we,
  input  logic [1:0]                 wr_widx,
  input  chunk_t                     wr_wdata,
  input  logic [1:0]                 wr_ridx,
  output chunk_t                     wr_rdata
);
  chunk_t rd_entry [N_CHUNK];
  chunk_t wr_entry [N_CHUNK];

  always_ff @(posedge clk) begin
    if (rd_we) rd_entry[rd_widx] <= rd_wdata;
    if (wr_we) wr_entry[wr_widx] <= wr_wdata;
  end

  assign rd_rdata = rd_entry[rd_ridx];
  assign wr_rdata = wr_entry[wr_ridx];

endmodule
