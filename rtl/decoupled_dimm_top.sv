// decoupled_dimm_top: a decoupled-DIMM memory system, N_CH channels wide.
//
// The idea: DRAM devices run at 1/M of the channel's data rate (1:2 by default, e.g.
// DDR3-1066 devices behind a 2133 MT/s channel). Each DIMM carries a sync-buffer that
// relays commands and data between the fast channel and the DIMM's slow rank bus, so one
// rank alone cannot fill the channel, but the ranks of several DIMMs working in parallel can.
// The memory controller schedules as if the ranks ran at channel speed and adds one rule for
// ranks that share a rank bus.
//
// Structure per channel: one mem_ctrl, N_DIMM sync_buffers on the shared channel. The
// channel data bus is modelled without tri-states: the controller's write data is broadcast
// to every sync-buffer, and the sync-buffers' read data is ORed under their output enables
// (`bus_conflict` goes high, sticky, if two drivers ever overlap). The DRAM ranks are outside
// this module: each sync-buffer's rank-bus pins are ports, indexed [channel][dimm].
// Requests enter on one valid/ready port and are steered to the channel chosen by addr_map
// (consecutive cache lines alternate between channels); each channel returns its own
// read responses and write acknowledgements.
// The default configuration is the one used as the base of the evaluation: two channels,
// two DIMMs per channel, two ranks per DIMM, eight banks per rank, DDR3-1066 8-8-8 devices
// behind 2133 MT/s channels, 64-entry request buffers.
module decoupled_dimm_top
  import ddr_pkg::*;
#(
  parameter int N_CH    = 2,
  parameter int N_DIMM  = 2,
  parameter int N_RANK  = 2,
  parameter int N_BANK  = 8,
  parameter int M       = 2,
  parameter int QDEPTH  = 64,
  parameter int ID_W    = 8,
  parameter int CL      = 8,
  parameter int CWL     = 6,
  parameter int T_RCD   = 8,
  parameter int T_RP    = 8,
  parameter int T_RAS   = 20,
  parameter int T_WR    = 8,
  parameter int PD_IDLE = 8,
  parameter int T_XP    = 12,
  parameter int ADDR_W  = $clog2(N_CH) + $clog2(N_DIMM) + $clog2(N_RANK) + $clog2(N_BANK) + 7 + ROW_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [ID_W-1:0]   req_id,
  input  line_t             req_wdata,
  // per-channel returns
  output logic              resp_valid [N_CH],
  output logic [ID_W-1:0]   resp_id    [N_CH],
  output line_t             resp_rdata [N_CH],
  output logic              wack_valid [N_CH],
  output logic [ID_W-1:0]   wack_id    [N_CH],
  output mc_ev_t            mc_ev      [N_CH],
  output logic              mc_drain   [N_CH],
  // rank buses, one per DIMM
  output logic              dev_clk    [N_CH][N_DIMM],
  output ddr_ca_t           dev_ca     [N_CH][N_DIMM],
  output logic [N_RANK-1:0] dev_cs_n   [N_CH][N_DIMM],
  output logic [N_RANK-1:0] dev_cke    [N_CH][N_DIMM],
  output logic [N_RANK-1:0] dev_odt    [N_CH][N_DIMM],
  output chunk_t            dev_dq_out [N_CH][N_DIMM],
  output logic              dev_dq_oe  [N_CH][N_DIMM],
  input  chunk_t            dev_dq_in  [N_CH][N_DIMM],
  // status
  output logic              bus_conflict,
  output logic              cmd_overflow
);
  localparam int NR = N_DIMM * N_RANK;

  logic [$clog2(N_CH+1)-1:0]   r_ch;
  logic [$clog2(N_DIMM+1)-1:0] r_dimm_unused;
  logic [$clog2(N_RANK+1)-1:0] r_rank_unused;
  logic [BA_W-1:0]             r_bank_unused;
  logic [ROW_W-1:0]            r_row_unused;
  logic [9:0]                  r_col_unused;

  addr_map #(.N_CH(N_CH), .N_DIMM(N_DIMM), .N_RANK(N_RANK), .N_BANK(N_BANK), .ADDR_W(ADDR_W)) u_route (
    .line_addr(req_addr), .ch(r_ch), .dimm(r_dimm_unused), .rank(r_rank_unused),
    .bank(r_bank_unused), .row(r_row_unused), .col(r_col_unused)
  );

  logic            mc_ready  [N_CH];
  logic [N_CH-1:0] conflict_c;
  logic [N_CH*N_DIMM-1:0] ovf;

  always_comb begin
    req_ready = 1'b0;
    for (int c = 0; c < N_CH; c++)
      if (int'(r_ch) == c) req_ready = mc_ready[c];
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    ddr_ca_t       bus_ca;
    logic [NR-1:0] bus_cs_n, bus_cke, bus_odt;
    chunk_t        mc_dq_out, mc_dq_in;
    logic          mc_dq_oe;
    chunk_t        syb_dq_out [N_DIMM];
    logic          syb_dq_oe  [N_DIMM];

    mem_ctrl #(
      .M(M), .N_CH(N_CH), .N_DIMM(N_DIMM), .N_RANK(N_RANK), .N_BANK(N_BANK), .QDEPTH(QDEPTH),
      .ID_W(ID_W), .CL(CL), .CWL(CWL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_WR(T_WR),
      .PD_IDLE(PD_IDLE), .T_XP(T_XP), .ADDR_W(ADDR_W)
    ) u_mc (
      .clk, .rst_n,
      .req_valid(req_valid && int'(r_ch) == c), .req_ready(mc_ready[c]),
      .req_write, .req_addr, .req_id, .req_wdata,
      .resp_valid(resp_valid[c]), .resp_id(resp_id[c]), .resp_rdata(resp_rdata[c]),
      .wack_valid(wack_valid[c]), .wack_id(wack_id[c]),
      .bus_ca, .bus_cs_n, .bus_cke, .bus_odt,
      .bus_dq_out(mc_dq_out), .bus_dq_oe(mc_dq_oe), .bus_dq_in(mc_dq_in),
      .ev(mc_ev[c]), .drain(mc_drain[c])
    );

    for (genvar d = 0; d < N_DIMM; d++) begin : g_dimm
      sync_buffer #(.M(M), .N_RANK(N_RANK), .CL(CL), .CWL(CWL)) u_syb (
        .clk, .rst_n,
        .bus_ca,
        .bus_cs_n(bus_cs_n[d*N_RANK +: N_RANK]),
        .bus_cke (bus_cke [d*N_RANK +: N_RANK]),
        .bus_odt (bus_odt [d*N_RANK +: N_RANK]),
        .bus_dq_in(mc_dq_out), .bus_dq_out(syb_dq_out[d]), .bus_dq_oe(syb_dq_oe[d]),
        .dev_clk(dev_clk[c][d]), .dev_ca(dev_ca[c][d]), .dev_cs_n(dev_cs_n[c][d]),
        .dev_cke(dev_cke[c][d]), .dev_odt(dev_odt[c][d]),
        .dev_dq_in(dev_dq_in[c][d]), .dev_dq_out(dev_dq_out[c][d]), .dev_dq_oe(dev_dq_oe[c][d]),
        .cmd_overflow(ovf[c*N_DIMM + d])
      );
    end

    // Channel data bus: wired-OR of the enabled drivers.
    always_comb begin
      int n;
      mc_dq_in = '0;
      n = mc_dq_oe ? 1 : 0;
      for (int d = 0; d < N_DIMM; d++)
        if (syb_dq_oe[d]) begin
          mc_dq_in = mc_dq_in | syb_dq_out[d];
          n++;
        end
      conflict_c[c] = (n > 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_conflict <= 1'b0;
    else if (|conflict_c) bus_conflict <= 1'b1;
  end

  assign cmd_overflow = |ovf;

endmodule
