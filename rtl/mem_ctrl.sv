// mem_ctrl: memory controller of one decoupled-DIMM channel.
//
// The controller schedules as if every rank were attached directly to the channel at the
// channel's clock: all DRAM timing is kept in bus clocks (device clocks times M) and
// includes the sync-buffer's relay delay. On top of that it keeps the extra rule that makes
// the decoupled DIMM safe: commands to ranks that share a rank bus (the ranks behind one
// sync-buffer) are kept at least one device clock apart, and their data bursts must not
// overlap on that slower rank bus. With that rule nothing collides on a rank bus or in a
// sync-buffer entry as long as nothing collides on the channel.
//
// Policy (the evaluated configuration): close page with auto precharge, so every request is
// an ACT followed by a READ or WRITE with A10 set; a 64-entry request buffer; column commands
// before activations; reads before writes, except that once pending writes fill more than
// half of the buffer they go first until they drop below a quarter (write drain); oldest
// first within a class; a rank with no pending request that stays idle for PD_IDLE bus clocks
// is put into precharge power-down (CKE low) and is woken, with T_XP bus clocks of exit
// latency, when a request for it arrives. Addresses are mapped by addr_map.
//
// Timing of one command placed on the channel in bus cycle t with device-clock phase p:
//   relay(p)   = M - p (+ M when p = M-1)    it reaches the devices at t + relay(p)
//   read data  : on the channel at t + relay(p) + CL*M + 5M - 4, four bus clocks
//   write data : driven by the controller at t + relay(p) + CWL*M - 2, four bus clocks
// The controller's own divider (syb_clk_div) is reset with the sync-buffers' and so knows p.
// Request port: valid/ready. Read data returns on resp_* (one pulse, whole line); a write is
// acknowledged on wack_* when its data has been sent. Neither return port can be stalled.
// Outputs to the channel are registered; decisions in cycle c appear on the bus in c+1.
// Not modelled: refresh, mode-register setup, tRRD/tFAW, write-to-read turnaround, ODT
// (driven low). `now` is a 32-bit cycle count; timing compares assume it does not wrap.
module mem_ctrl
  import ddr_pkg::*;
#(
  parameter int M        = 2,    // channel : device data-rate ratio (1:2)
  parameter int N_CH     = 2,    // channels in the system (address bits skipped)
  parameter int N_DIMM   = 2,    // DIMMs (sync-buffers / rank buses) on this channel
  parameter int N_RANK   = 2,    // ranks per DIMM
  parameter int N_BANK   = 8,    // banks per rank
  parameter int QDEPTH   = 64,   // request buffer entries
  parameter int ID_W     = 8,
  parameter int CL       = 8,    // device clocks, DDR3-1066 8-8-8
  parameter int CWL      = 6,
  parameter int T_RCD    = 8,
  parameter int T_RP     = 8,
  parameter int T_RAS    = 20,
  parameter int T_WR     = 8,
  parameter int PD_IDLE  = 8,    // bus clocks idle before power-down (7.5 ns at 1066 MHz)
  parameter int T_XP     = 12,   // bus clocks power-down exit (11.25 ns at 1066 MHz)
  parameter int ADDR_W   = $clog2(N_CH) + $clog2(N_DIMM) + $clog2(N_RANK) + $clog2(N_BANK) + 7 + ROW_W,
  localparam int NR      = N_DIMM * N_RANK
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
  output logic              resp_valid,
  output logic [ID_W-1:0]   resp_id,
  output line_t             resp_rdata,
  output logic              wack_valid,
  output logic [ID_W-1:0]   wack_id,
  // channel
  output ddr_ca_t           bus_ca,
  output logic [NR-1:0]     bus_cs_n,
  output logic [NR-1:0]     bus_cke,
  output logic [NR-1:0]     bus_odt,
  output chunk_t            bus_dq_out,
  output logic              bus_dq_oe,
  input  chunk_t            bus_dq_in,
  // scheduler events
  output mc_ev_t            ev,
  output logic              drain
);
  localparam int NB      = NR * N_BANK;
  localparam int QI_W    = $clog2(QDEPTH);
  localparam int D_W     = $clog2(N_DIMM + 1);
  localparam int R_W     = $clog2(N_RANK + 1);
  localparam int PH_W    = $clog2(M + 1);
  localparam int RLAT0   = CL * M + 5 * M - 4;      // read data after device command
  localparam int WLAT0   = CWL * M - 2;             // write data after device command
  localparam int LAT_MAX = 2 * M + RLAT0;
  localparam int S       = 1 << $clog2(LAT_MAX + N_CHUNK + 2);
  localparam int S_W     = $clog2(S);

  typedef enum logic [1:0] {Q_ACT, Q_COL, Q_WDATA} qst_e;

  typedef struct packed {
    logic             valid;
    qst_e             st;
    logic             wr;
    logic [D_W-1:0]   dimm;
    logic [R_W-1:0]   rank;
    logic [BA_W-1:0]  bank;
    logic [ROW_W-1:0] row;
    logic [9:0]       col;
    logic [ID_W-1:0]  id;
    logic [31:0]      ts;
  } qent_t;

  // ---------------------------------------------------------------- state
  qent_t        q     [QDEPTH];
  line_t        qdata [QDEPTH];
  logic [31:0]  now;
  logic         bk_open   [NB];
  logic [31:0]  bk_col_ok [NB];
  logic [31:0]  bk_act_ok [NB];
  logic [31:0]  bk_act_t  [NB];
  logic [31:0]  rb_cmd_ok [N_DIMM];
  logic [31:0]  rb_free   [N_DIMM];
  logic         cke       [NR];
  logic [31:0]  wake_ok   [NR];
  logic [31:0]  quiet_at  [NR];
  logic [$clog2(PD_IDLE+1)-1:0] idle_cnt [NR];
  logic [S-1:0] busres;
  logic         ret_v  [S];
  logic [ID_W-1:0] ret_id [S];
  logic         wsl_v  [S];
  logic [QI_W-1:0] wsl_q [S];

  // ---------------------------------------------------------------- device phase
  logic           dclk_unused, dtick_unused;
  logic [PH_W-1:0] ph;
  syb_clk_div #(.M(M)) u_div (.clk, .rst_n, .dev_clk(dclk_unused), .dev_tick(dtick_unused), .dev_phase(ph));

  // Decisions made now go on the bus next cycle, in phase phb.
  logic [PH_W-1:0] phb;
  logic [31:0]     tb, tcmd;
  logic [31:0]     relay, rlat, wlat;
  always_comb begin
    phb   = (int'(ph) == M - 1) ? '0 : ph + 1'b1;
    relay = 32'(M - int'(phb)) + ((int'(phb) == M - 1) ? 32'(M) : 32'd0);
    tb    = now + 32'd1;
    tcmd  = tb + relay;
    rlat  = relay + 32'(RLAT0);
    wlat  = relay + 32'(WLAT0);
  end

  // ---------------------------------------------------------------- address mapping
  logic [$clog2(N_CH+1)-1:0] m_ch;
  logic [D_W-1:0]   m_dimm;
  logic [R_W-1:0]   m_rank;
  logic [BA_W-1:0]  m_bank;
  logic [ROW_W-1:0] m_row;
  logic [9:0]       m_col;
  addr_map #(.N_CH(N_CH), .N_DIMM(N_DIMM), .N_RANK(N_RANK), .N_BANK(N_BANK), .ADDR_W(ADDR_W)) u_map (
    .line_addr(req_addr), .ch(m_ch), .dimm(m_dimm), .rank(m_rank), .bank(m_bank), .row(m_row), .col(m_col)
  );

  function automatic int fbank(logic [D_W-1:0] d, logic [R_W-1:0] r, logic [BA_W-1:0] b);
    return (int'(d) * N_RANK + int'(r)) * N_BANK + int'(b);
  endfunction
  function automatic int frank(logic [D_W-1:0] d, logic [R_W-1:0] r);
    return int'(d) * N_RANK + int'(r);
  endfunction
  function automatic logic [31:0] max32(logic [31:0] a, logic [31:0] b);
    return (a > b) ? a : b;
  endfunction

  // ---------------------------------------------------------------- free slot, counts
  logic            have_free;
  logic [QI_W-1:0] free_idx;
  int              wcount;
  logic [NR-1:0]   pending;
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    wcount    = 0;
    pending   = '0;
    for (int i = QDEPTH - 1; i >= 0; i--) begin
      if (!q[i].valid) begin
        have_free = 1'b1;
        free_idx  = QI_W'(i);
      end else begin
        if (q[i].wr) wcount++;
        pending[frank(q[i].dimm, q[i].rank)] = 1'b1;
      end
    end
  end
  assign req_ready = have_free;

  // ---------------------------------------------------------------- candidate selection
  logic            sel_v, sel_col;
  logic [QI_W-1:0] sel_i;
  logic            st_rb, st_ch;
  always_comb begin
    logic [33:0] best_key, key;
    logic        rank_ok, rb_ok, tim_ok, win_ok, chan_ok, can_act, can_col, pref;
    int          fb, rk, dm;
    logic [31:0] lat;
    sel_v    = 1'b0;
    sel_col  = 1'b0;
    sel_i    = '0;
    best_key = '0;
    st_rb    = 1'b0;
    st_ch    = 1'b0;
    for (int i = 0; i < QDEPTH; i++) begin
      fb      = fbank(q[i].dimm, q[i].rank, q[i].bank);
      rk      = frank(q[i].dimm, q[i].rank);
      dm      = int'(q[i].dimm);
      rank_ok = cke[rk] && (tb >= wake_ok[rk]);
      rb_ok   = (tb >= rb_cmd_ok[dm]);
      lat     = q[i].wr ? wlat : rlat;
      win_ok  = (tcmd + 32'((q[i].wr ? CWL : CL) * M) >= rb_free[dm]);
      chan_ok = (busres[lat[S_W-1:0] + 1 +: N_CHUNK] == '0);
      tim_ok  = q[i].valid && q[i].st == Q_COL && rank_ok && (tcmd >= bk_col_ok[fb]);
      can_col = tim_ok && rb_ok && win_ok && chan_ok;
      can_act = q[i].valid && q[i].st == Q_ACT && rank_ok && rb_ok && !bk_open[fb] &&
                (tcmd >= bk_act_ok[fb]);
      if (tim_ok && chan_ok && !(rb_ok && win_ok)) st_rb = 1'b1;
      if (tim_ok && rb_ok && win_ok && !chan_ok)   st_ch = 1'b1;
      pref    = drain ? q[i].wr : !q[i].wr;
      key     = {can_col, pref, ~q[i].ts};
      if ((can_col || can_act) && (!sel_v || key > best_key)) begin
        sel_v    = 1'b1;
        sel_col  = can_col;
        sel_i    = QI_W'(i);
        best_key = key;
      end
    end
  end

  // ---------------------------------------------------------------- issue bookkeeping
  int             iss_fb, iss_rk, iss_dm;
  logic [31:0]    iss_lat, iss_pre, iss_done;
  logic [S_W-1:0] iss_slot;
  always_comb begin
    iss_fb   = fbank(q[sel_i].dimm, q[sel_i].rank, q[sel_i].bank);
    iss_rk   = frank(q[sel_i].dimm, q[sel_i].rank);
    iss_dm   = int'(q[sel_i].dimm);
    iss_lat  = q[sel_i].wr ? wlat : rlat;
    iss_slot = S_W'(now + iss_lat + 32'd1);
    if (q[sel_i].wr) begin
      // write with auto precharge: precharge after write recovery, not before tRAS
      iss_pre  = max32(tcmd + 32'((CWL + N_CHUNK + T_WR) * M), bk_act_t[iss_fb] + 32'(T_RAS * M));
      iss_done = tcmd + 32'((CWL + N_CHUNK) * M);
    end else begin
      // read with auto precharge: precharge after the burst (tRTP), not before tRAS
      iss_pre  = max32(tcmd + 32'(N_CHUNK * M), bk_act_t[iss_fb] + 32'(T_RAS * M));
      iss_done = tcmd + 32'((CL + N_CHUNK) * M);
    end
  end

  // ---------------------------------------------------------------- sequential
  logic [S_W-1:0] slot_now, slot_nxt;
  assign slot_now = now[S_W-1:0];
  assign slot_nxt = slot_now + 1'b1;

  logic [2:0]  rcnt;
  logic [ID_W-1:0] rcur;
  chunk_t      rline [3];
  logic [1:0]  wcnt;
  line_t       wsh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      drain      <= 1'b0;
      busres     <= '0;
      bus_ca     <= CA_NOP;
      bus_cs_n   <= '1;
      bus_cke    <= '1;
      bus_odt    <= '0;
      bus_dq_out <= '0;
      bus_dq_oe  <= 1'b0;
      resp_valid <= 1'b0;
      resp_id    <= '0;
      resp_rdata <= '0;
      wack_valid <= 1'b0;
      wack_id    <= '0;
      ev         <= '0;
      rcnt       <= '0;
      rcur       <= '0;
      wcnt       <= '0;
      wsh        <= '0;
      for (int i = 0; i < 3; i++) rline[i] <= '0;
      for (int i = 0; i < QDEPTH; i++) begin
        q[i]     <= '0;
        qdata[i] <= '0;
      end
      for (int b = 0; b < NB; b++) begin
        bk_open[b]   <= 1'b0;
        bk_col_ok[b] <= '0;
        bk_act_ok[b] <= '0;
        bk_act_t[b]  <= '0;
      end
      for (int d = 0; d < N_DIMM; d++) begin
        rb_cmd_ok[d] <= '0;
        rb_free[d]   <= '0;
      end
      for (int r = 0; r < NR; r++) begin
        cke[r]      <= 1'b1;
        wake_ok[r]  <= '0;
        quiet_at[r] <= '0;
        idle_cnt[r] <= '0;
      end
      for (int s = 0; s < S; s++) begin
        ret_v[s]  <= 1'b0;
        ret_id[s] <= '0;
        wsl_v[s]  <= 1'b0;
        wsl_q[s]  <= '0;
      end
    end else begin
      now        <= now + 32'd1;
      ev         <= '0;
      bus_ca     <= CA_NOP;
      bus_cs_n   <= '1;
      resp_valid <= 1'b0;
      wack_valid <= 1'b0;
      busres     <= busres >> 1;
      ev.rankbus_stall <= st_rb;
      ev.chbus_stall   <= st_ch;

      // write-drain hysteresis
      if (wcount > QDEPTH / 2) begin
        drain <= 1'b1;
        if (!drain) ev.drain_on <= 1'b1;
      end else if (wcount < QDEPTH / 4) begin
        drain <= 1'b0;
      end

      // accept a request
      if (req_valid && have_free) begin
        q[free_idx].valid <= 1'b1;
        q[free_idx].st    <= Q_ACT;
        q[free_idx].wr    <= req_write;
        q[free_idx].dimm  <= m_dimm;
        q[free_idx].rank  <= m_rank;
        q[free_idx].bank  <= m_bank;
        q[free_idx].row   <= m_row;
        q[free_idx].col   <= m_col;
        q[free_idx].id    <= req_id;
        q[free_idx].ts    <= now;
        qdata[free_idx]   <= req_wdata;
      end

      // issue one command
      if (sel_v) begin
        bus_cs_n[iss_rk]  <= 1'b0;
        rb_cmd_ok[iss_dm] <= tb + 32'(M);
        if (!sel_col) begin
          bus_ca            <= encode_cmd(CMD_ACT, q[sel_i].bank, q[sel_i].row);
          bk_open[iss_fb]   <= 1'b1;
          bk_col_ok[iss_fb] <= tcmd + 32'(T_RCD * M);
          bk_act_t[iss_fb]  <= tcmd;
          q[sel_i].st       <= Q_COL;
          ev.act            <= 1'b1;
        end else begin
          bus_ca <= encode_cmd(q[sel_i].wr ? CMD_WR : CMD_RD, q[sel_i].bank,
                               ROW_W'(q[sel_i].col) | ROW_W'(1 << AP_BIT));
          bk_open[iss_fb] <= 1'b0;
          if (q[sel_i].wr) begin
            q[sel_i].st       <= Q_WDATA;
            wsl_v[iss_slot]   <= 1'b1;
            wsl_q[iss_slot]   <= sel_i;
            ev.wr             <= 1'b1;
          end else begin
            q[sel_i].valid    <= 1'b0;
            ret_v[iss_slot]   <= 1'b1;
            ret_id[iss_slot]  <= q[sel_i].id;
            ev.rd             <= 1'b1;
          end
          bk_act_ok[iss_fb] <= iss_pre + 32'(T_RP * M);
          rb_free[iss_dm]   <= iss_done;
          quiet_at[iss_rk]  <= max32(quiet_at[iss_rk], max32(iss_pre + 32'(T_RP * M), iss_done));
          busres            <= (busres >> 1) | (S'({N_CHUNK{1'b1}}) << iss_lat[S_W-1:0]);
        end
      end

      // write data: chunk 0 goes on the bus next cycle when its slot comes up
      bus_dq_oe <= 1'b0;
      if (wsl_v[slot_nxt]) begin
        wsl_v[slot_nxt] <= 1'b0;
        bus_dq_out <= qdata[wsl_q[slot_nxt]][CHUNK_W-1:0];
        bus_dq_oe  <= 1'b1;
        wsh        <= qdata[wsl_q[slot_nxt]] >> CHUNK_W;
        wcnt       <= 2'(N_CHUNK - 1);
        q[wsl_q[slot_nxt]].valid <= 1'b0;
        wack_valid <= 1'b1;
        wack_id    <= q[wsl_q[slot_nxt]].id;
      end else if (wcnt != 0) begin
        bus_dq_out <= wsh[CHUNK_W-1:0];
        bus_dq_oe  <= 1'b1;
        wsh        <= wsh >> CHUNK_W;
        wcnt       <= wcnt - 1'b1;
      end

      // read data: first chunk is on the bus in the slot's cycle
      if (ret_v[slot_now]) begin
        ret_v[slot_now] <= 1'b0;
        rline[0] <= bus_dq_in;
        rcur     <= ret_id[slot_now];
        rcnt     <= 3'd1;
      end else if (rcnt != 0) begin
        if (rcnt == 3'(N_CHUNK - 1)) begin
          resp_valid <= 1'b1;
          resp_id    <= rcur;
          resp_rdata <= {bus_dq_in, rline[2], rline[1], rline[0]};
          rcnt       <= '0;
        end else begin
          rline[rcnt[1:0]] <= bus_dq_in;
          rcnt <= rcnt + 1'b1;
        end
      end

      // power management, per rank
      for (int r = 0; r < NR; r++) begin
        if (cke[r]) begin
          if (!pending[r] && tcmd >= quiet_at[r]) begin
            if (int'(idle_cnt[r]) >= PD_IDLE - 1) begin
              cke[r]      <= 1'b0;
              idle_cnt[r] <= '0;
              ev.pd_enter <= 1'b1;
            end else begin
              idle_cnt[r] <= idle_cnt[r] + 1'b1;
            end
          end else begin
            idle_cnt[r] <= '0;
          end
        end else if (pending[r]) begin
          cke[r]     <= 1'b1;
          wake_ok[r] <= tb + 32'(T_XP);
          ev.pd_exit <= 1'b1;
        end
        bus_cke[r] <= cke[r];
      end
    end
  end

  initial assert (N_RANK * N_DIMM <= 8 && M >= 2) else $error("mem_ctrl: unsupported configuration");

endmodule
