// syb_bus_data_if: the sync-buffer's DDRx data interface with the channel (component A).
//
// Reads: streams the RD entry onto the channel at the bus rate, one 128-bit chunk per bus
// clock. The outgoing burst is pipelined with the incoming one from the devices so that its
// last chunk completes one device clock after the last incoming chunk (the document's rule).
// With the incoming burst starting at device-side cycle S = T + CL*M, the outgoing chunk j is
// on the channel in bus cycle S + 5M - 4 + j (T = cycle of the rd_evt pulse).
// Writes: the memory controller places the write burst on the channel so that chunk k is in
// bus cycle T + CWL*M - 2 + k; this interface stores it into the WR entry at the end of that
// cycle, two bus clocks before the device-side interface needs chunk 0. The document's
// "one device clock later" rule cannot be met for writes (the slow side would have to start
// before the fast side has delivered), so writes use this earliest safe cut-through instead.
// bus_dq_oe is high while this sync-buffer drives the channel.
module syb_bus_data_if
  import ddr_pkg::*;
#(
  parameter int M   = 2,
  parameter int CL  = 8,
  parameter int CWL = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd_evt,
  input  logic       wr_evt,
  input  chunk_t     bus_dq_in,
  output chunk_t     bus_dq_out,
  output logic       bus_dq_oe,
  output logic       wrbuf_we,
  output logic [1:0] wrbuf_idx,
  output chunk_t     wrbuf_wdata,
  output logic [1:0] rdbuf_idx,
  input  chunk_t     rdbuf_rdata
);
  localparam int RD_OFF = CL * M + 5 * M - 4;          // first outgoing read chunk
  localparam int WR_OFF = CWL * M - 2;                 // first incoming write chunk
  localparam int RD_LEN = RD_OFF + N_CHUNK;
  localparam int WR_LEN = WR_OFF + N_CHUNK;

  logic [RD_LEN-1:0] rd_sr;
  logic [WR_LEN-1:0] wr_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sr <= '0;
      wr_sr <= '0;
    end else begin
      rd_sr <= {rd_sr[RD_LEN-2:0], rd_evt};
      wr_sr <= {wr_sr[WR_LEN-2:0], wr_evt};
    end
  end

  // Read drive: load chunk j at the end of cycle T + RD_OFF + j - 1.
  logic rd_load;
  always_comb begin
    rd_load   = 1'b0;
    rdbuf_idx = '0;
    for (int j = 0; j < N_CHUNK; j++)
      if (rd_sr[RD_OFF + j - 2]) begin
        rd_load   = 1'b1;
        rdbuf_idx = 2'(j);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_dq_out <= '0;
      bus_dq_oe  <= 1'b0;
    end else if (rd_load) begin
      bus_dq_out <= rdbuf_rdata;
      bus_dq_oe  <= 1'b1;
    end else begin
      bus_dq_oe  <= 1'b0;
    end
  end

  // Write capture: chunk k at the end of cycle T + WR_OFF + k.
  always_comb begin
    wrbuf_we  = 1'b0;
    wrbuf_idx = '0;
    for (int k = 0; k < N_CHUNK; k++)
      if (wr_sr[WR_OFF + k - 1]) begin
        wrbuf_we  = 1'b1;
        wrbuf_idx = 2'(k);
      end
  end
  assign wrbuf_wdata = bus_dq_in;

  initial assert (M >= 2 && CWL * M >= 3) else $error("syb_bus_data_if: bad timing parameters");

endmodule
