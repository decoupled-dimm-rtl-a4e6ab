// dram_rank_model: behavioural model of one rank of DDR3 devices (x64 together), for
// simulation only. It is clocked by the device clock that the sync-buffer generates.
// Command/address is sampled in the middle of each device clock (falling edge); read data
// is driven from the rising edge of device clock D+CL, one 128-bit chunk (two beats) per
// clock, for four clocks; write data is sampled in the middle of device clocks D+CWL..+3.
// It counts, as `errors`, every DRAM timing or protocol violation it sees: ACT to an open
// or not yet precharged bank, column access before tRCD or to a closed bank, commands with
// CKE low or before the power-down exit time, a column command without auto precharge, and
// write data with the output enable low.
module dram_rank_model
  import ddr_pkg::*;
  import tb_dram_pkg::*;
#(
  parameter int CH       = 0,
  parameter int DIMM     = 0,
  parameter int RANK     = 0,
  parameter int CL       = 8,
  parameter int CWL      = 6,
  parameter int T_RCD    = 8,
  parameter int T_RP     = 8,
  parameter int T_RAS    = 20,
  parameter int T_WR     = 8,
  parameter int T_XP_DEV = 5
) (
  input  logic    dev_clk,
  input  ddr_ca_t ca,
  input  logic    cs_n,
  input  logic    cke,
  input  chunk_t  dq_in,
  input  logic    dq_in_oe,
  output chunk_t  dq_out,
  output logic    dq_oe,
  output int      errors,
  output int      n_act,
  output int      n_rd,
  output int      n_wr,
  output int      n_pd
);
  typedef struct { int start; line_t data; } rd_t;
  typedef struct { int start; int key; } wr_t;

  line_t mem [int];
  rd_t   rdq [$];
  wr_t   wrq [$];
  int    dcnt = 0;
  bit    open_b [8];
  int    row_b  [8];
  int    act_t  [8];
  int    ready_t[8];
  int    cke_rise = -1000;
  bit    cke_q = 1'b1;
  line_t wline;
  int    last_rd_end = -100;

  initial begin
    errors = 0; n_act = 0; n_rd = 0; n_wr = 0; n_pd = 0;
    dq_out = '0; dq_oe = 1'b0;
    for (int b = 0; b < 8; b++) begin
      open_b[b] = 0; row_b[b] = 0; act_t[b] = -1000; ready_t[b] = 0;
    end
  end

  function automatic int mkkey(int b, int r, int c);
    return (r << 13) | (b << 10) | c;
  endfunction

  function automatic line_t read_line(int b, int r, int c);
    int k = mkkey(b, r, c);
    if (mem.exists(k)) return mem[k];
    return default_line(CH, DIMM, RANK, b, r, c);
  endfunction

  always @(posedge dev_clk) begin
    dcnt = dcnt + 1;
    dq_oe = 1'b0;
    if (rdq.size() > 0 && dcnt >= rdq[0].start + N_CHUNK) void'(rdq.pop_front());
    if (rdq.size() > 0 && dcnt >= rdq[0].start) begin
      dq_out = rdq[0].data[(dcnt - rdq[0].start) * CHUNK_W +: CHUNK_W];
      dq_oe  = 1'b1;
    end
  end

  always @(negedge dev_clk) begin
    ddr_cmd_e c;
    int b;
    // write data
    if (wrq.size() > 0 && dcnt >= wrq[0].start && dcnt < wrq[0].start + N_CHUNK) begin
      if (!dq_in_oe) errors++;
      wline[(dcnt - wrq[0].start) * CHUNK_W +: CHUNK_W] = dq_in;
      if (dcnt == wrq[0].start + N_CHUNK - 1) begin
        mem[wrq[0].key] = wline;
        void'(wrq.pop_front());
      end
    end
    // CKE
    if (cke && !cke_q) cke_rise = dcnt;
    if (!cke && cke_q) n_pd++;
    cke_q = cke;
    // command
    if (!cs_n) begin
      c = decode_cmd(ca.ras_n, ca.cas_n, ca.we_n);
      b = int'(ca.ba);
      if (!cke || dcnt < cke_rise + T_XP_DEV) errors++;
      case (c)
        CMD_ACT: begin
          if (open_b[b] || dcnt < ready_t[b]) errors++;
          open_b[b] = 1; row_b[b] = int'(ca.a); act_t[b] = dcnt; n_act++;
        end
        CMD_RD, CMD_WR: begin
          if (!open_b[b] || dcnt < act_t[b] + T_RCD) errors++;
          if (!ca.a[AP_BIT]) errors++;
          open_b[b] = 0;
          if (c == CMD_RD) begin
            rd_t r;
            r.start = dcnt + CL;
            r.data  = read_line(b, row_b[b], int'(ca.a[9:0]));
            if (r.start < last_rd_end) errors++;
            last_rd_end = r.start + N_CHUNK;
            rdq.push_back(r);
            ready_t[b] = ((dcnt + N_CHUNK > act_t[b] + T_RAS) ? dcnt + N_CHUNK : act_t[b] + T_RAS) + T_RP;
            n_rd++;
          end else begin
            wr_t w;
            w.start = dcnt + CWL;
            w.key   = mkkey(b, row_b[b], int'(ca.a[9:0]));
            wrq.push_back(w);
            ready_t[b] = ((dcnt + CWL + N_CHUNK + T_WR > act_t[b] + T_RAS) ?
                          dcnt + CWL + N_CHUNK + T_WR : act_t[b] + T_RAS) + T_RP;
            n_wr++;
          end
        end
        CMD_PRE: begin
          open_b[b] = 0; ready_t[b] = dcnt + T_RP;
        end
        default: ;
      endcase
    end
  end

endmodule
