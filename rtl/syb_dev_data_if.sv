// syb_dev_data_if: the sync-buffer's data interface with the DRAM devices (component E).
//
// Reads: CL device clocks after a READ reaches the rank bus, the addressed rank drives the
// burst, one 128-bit chunk per device clock. This interface samples each chunk at the end
// of its device clock and writes it into the RD entry.
// Writes: CWL device clocks after a WRITE reaches the rank bus, it drives the four chunks of
// the WR entry onto the rank bus, one per device clock, with dq_oe high.
// There is no strobe in this model: both directions are timed from the rd_evt / wr_evt
// pulses of the device control interface with a bus-clock delay line, using the read and
// write latencies the devices are programmed with (CL, CWL, in device clocks). Timing below
// counts bus clocks from the pulse cycle T:
//   read chunk k written into RD entry at the end of cycle T + CL*M + k*M + M-1
//   write chunk k driven from cycle T + CWL*M + k*M for M cycles
module syb_dev_data_if
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
  input  chunk_t     dq_in,
  output chunk_t     dq_out,
  output logic       dq_oe,
  output logic       rdbuf_we,
  output logic [1:0] rdbuf_idx,
  output chunk_t     rdbuf_wdata,
  output logic [1:0] wrbuf_idx,
  input  chunk_t     wrbuf_rdata
);
  localparam int RD_LEN = CL * M + N_CHUNK * M;
  localparam int WR_LEN = CWL * M + N_CHUNK * M;

  // rd_sr[i] / wr_sr[i] is high in bus cycle T+1+i after a pulse in cycle T.
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

  // Read capture taps.
  always_comb begin
    rdbuf_we  = 1'b0;
    rdbuf_idx = '0;
    for (int k = 0; k < N_CHUNK; k++)
      if (rd_sr[CL*M + k*M + M - 2]) begin
        rdbuf_we  = 1'b1;
        rdbuf_idx = 2'(k);
      end
  end
  assign rdbuf_wdata = dq_in;

  // Write drive taps: load chunk k at the end of cycle T + CWL*M + k*M - 1.
  logic wr_load;
  always_comb begin
    wr_load   = 1'b0;
    wrbuf_idx = '0;
    for (int k = 0; k < N_CHUNK; k++)
      if (wr_sr[CWL*M + k*M - 2]) begin
        wr_load   = 1'b1;
        wrbuf_idx = 2'(k);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_out <= '0;
      dq_oe  <= 1'b0;
    end else if (wr_load) begin
      dq_out <= wrbuf_rdata;
      dq_oe  <= 1'b1;
    end else if (wr_sr[CWL*M + N_CHUNK*M - 2]) begin
      dq_oe  <= 1'b0;
    end
  end

  initial assert (M >= 2 && CWL * M >= 3) else $error("syb_dev_data_if: bad timing parameters");

endmodule
