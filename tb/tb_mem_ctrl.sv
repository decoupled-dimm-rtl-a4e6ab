// tb_mem_ctrl: one channel controller (default parameters: M=2, 2 DIMMs x 2 ranks, 64-entry
// request buffer, DDR3-1066 8-8-8) driving two sync-buffers with behavioural DDR3 ranks, i.e.
// one channel of the full system without the channel router. Only even (channel-0) line
// addresses are used. Checks:
//   * the command stream on the channel: every column command follows an ACT to the same
//     bank by at least tRCD device clocks (in bus clocks on the channel), carries the
//     auto-precharge bit A10, and commands for the same DIMM are at least M bus clocks apart;
//   * an idle read (rank awake) returns after the fixed latency worked out from the rules;
//   * random reads/writes against a reference memory, with write bursts (write drain) and
//     idle gaps (power-down): all data, no DRAM timing errors, no command-entry overflow;
//   * each scheduler event (ACT, RD, WR, both stalls, drain, power-down entry/exit) occurred.
module tb_mem_ctrl;
  import ddr_pkg::*;
  import tb_dram_pkg::*;
  localparam int M = 2, N_DIMM = 2, N_RANK = 2, NR = N_DIMM * N_RANK;
  localparam int CL = 8, T_RCD = 8, ADDR_W = 27;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic              req_valid = 1'b0, req_ready, req_write = 1'b0;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [7:0]        req_id = '0, resp_id, wack_id;
  line_t             req_wdata = '0, resp_rdata;
  logic              resp_valid, wack_valid, drain;
  ddr_ca_t           bus_ca;
  logic [NR-1:0]     bus_cs_n, bus_cke, bus_odt;
  chunk_t            bus_dq_out, bus_dq_in;
  logic              bus_dq_oe;
  mc_ev_t            ev;
  mem_ctrl dut (.*);

  // two sync-buffers with two ranks each
  chunk_t  s_dq [N_DIMM];
  logic    s_oe [N_DIMM];
  logic    s_ovf [N_DIMM];
  chunk_t  rk_dq [N_DIMM][N_RANK];
  logic    rk_oe [N_DIMM][N_RANK];
  int      rk_err [N_DIMM][N_RANK], rk_act [N_DIMM][N_RANK], rk_rd [N_DIMM][N_RANK];
  int      rk_wr [N_DIMM][N_RANK], rk_pd [N_DIMM][N_RANK];

  for (genvar d = 0; d < N_DIMM; d++) begin : g_d
    logic              dclk, doe;
    ddr_ca_t           dca;
    logic [N_RANK-1:0] dcs, dcke, dodt;
    chunk_t            dout, din;
    sync_buffer u_syb (
      .clk, .rst_n, .bus_ca, .bus_cs_n(bus_cs_n[d*N_RANK +: N_RANK]),
      .bus_cke(bus_cke[d*N_RANK +: N_RANK]), .bus_odt(bus_odt[d*N_RANK +: N_RANK]),
      .bus_dq_in(bus_dq_out), .bus_dq_out(s_dq[d]), .bus_dq_oe(s_oe[d]),
      .dev_clk(dclk), .dev_ca(dca), .dev_cs_n(dcs), .dev_cke(dcke), .dev_odt(dodt),
      .dev_dq_in(din), .dev_dq_out(dout), .dev_dq_oe(doe), .cmd_overflow(s_ovf[d])
    );
    for (genvar r = 0; r < N_RANK; r++) begin : g_r
      dram_rank_model #(.CH(0), .DIMM(d), .RANK(r)) u_rank (
        .dev_clk(dclk), .ca(dca), .cs_n(dcs[r]), .cke(dcke[r]), .dq_in(dout), .dq_in_oe(doe),
        .dq_out(rk_dq[d][r]), .dq_oe(rk_oe[d][r]), .errors(rk_err[d][r]),
        .n_act(rk_act[d][r]), .n_rd(rk_rd[d][r]), .n_wr(rk_wr[d][r]), .n_pd(rk_pd[d][r])
      );
    end
    assign din = (rk_oe[d][0] ? rk_dq[d][0] : '0) | (rk_oe[d][1] ? rk_dq[d][1] : '0);
  end
  assign bus_dq_in = (s_oe[0] ? s_dq[0] : '0) | (s_oe[1] ? s_dq[1] : '0);

  // ------------------------------------------------------------------ command-stream checks
  int act_at [int];            // last ACT per (rank, bank)
  int last_cmd [N_DIMM];
  int ev_cnt [8];
  always @(posedge clk) if (!rst_n) begin
    for (int d = 0; d < N_DIMM; d++) last_cmd[d] <= -100;
    for (int i = 0; i < 8; i++) ev_cnt[i] <= 0;
  end else begin
    cyc <= cyc + 1;
    if (ev.act) ev_cnt[0] <= ev_cnt[0] + 1;
    if (ev.rd) ev_cnt[1] <= ev_cnt[1] + 1;
    if (ev.wr) ev_cnt[2] <= ev_cnt[2] + 1;
    if (ev.rankbus_stall) ev_cnt[3] <= ev_cnt[3] + 1;
    if (ev.chbus_stall) ev_cnt[4] <= ev_cnt[4] + 1;
    if (ev.drain_on) ev_cnt[5] <= ev_cnt[5] + 1;
    if (ev.pd_enter) ev_cnt[6] <= ev_cnt[6] + 1;
    if (ev.pd_exit) ev_cnt[7] <= ev_cnt[7] + 1;
    check(s_oe[0] && s_oe[1] ? 1'b0 : 1'b1, "two sync-buffers drove the channel");
    if (bus_cs_n != '1) begin
      int rk, key, dm;
      ddr_cmd_e c;
      check($countones(~bus_cs_n) == 1, "one chip select per command");
      rk = 0;
      for (int r = 0; r < NR; r++) if (!bus_cs_n[r]) rk = r;
      dm = rk / N_RANK;
      key = rk * 8 + int'(bus_ca.ba);
      c = decode_cmd(bus_ca.ras_n, bus_ca.cas_n, bus_ca.we_n);
      check(cyc - last_cmd[dm] >= M, "commands to one DIMM closer than one device clock");
      last_cmd[dm] <= cyc;
      if (c == CMD_ACT) act_at[key] = cyc;
      if (c == CMD_RD || c == CMD_WR) begin
        check(act_at.exists(key) && cyc - act_at[key] >= T_RCD * M - (M - 1), "column command before tRCD");
        check(bus_ca.a[AP_BIT] == 1'b1, "auto-precharge bit");
        act_at.delete(key);
      end
    end
  end

  // ------------------------------------------------------------------ requests and responses
  line_t refm [int];
  line_t exp_data [256];
  bit    id_busy [256], id_wr [256];
  int    id_addr [256], resp_cyc [256];
  int    n_out = 0, next_id = 0, n_rd_ok = 0, n_wr_ok = 0, rid_m, wid_m;

  function automatic line_t ref_read(logic [ADDR_W-1:0] a);
    int row, bank;
    if (refm.exists(int'(a))) return refm[int'(a)];
    row  = int'(a[26:13]);
    bank = int'(a[5:3]) ^ (row & 7);
    return default_line(0, int'(a[1]), int'(a[2]), bank, row, int'(a[12:6]) * 8);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (resp_valid) begin
      rid_m = int'(resp_id);
      check(id_busy[rid_m] && !id_wr[rid_m], $sformatf("unexpected read response %0d", rid_m));
      check(resp_rdata == exp_data[rid_m], $sformatf("read data, id %0d", rid_m));
      resp_cyc[rid_m] = cyc;
      id_busy[rid_m] = 0; n_out--; n_rd_ok++;
    end
    if (wack_valid) begin
      wid_m = int'(wack_id);
      check(id_busy[wid_m] && id_wr[wid_m], $sformatf("unexpected write ack %0d", wid_m));
      id_busy[wid_m] = 0; n_out--; n_wr_ok++;
    end
  end

  task automatic send(bit wr, logic [ADDR_W-1:0] a, line_t data, output int id, output int acc);
    while (id_busy[next_id]) next_id = (next_id + 1) % 256;
    id = next_id;
    next_id = (next_id + 1) % 256;
    id_busy[id] = 1; id_wr[id] = wr; id_addr[id] = int'(a);
    n_out++;
    if (wr) refm[int'(a)] = data;
    else exp_data[id] = ref_read(a);
    @(negedge clk);
    req_valid = 1'b1; req_write = wr; req_addr = a; req_id = 8'(id); req_wdata = data;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    acc = cyc - 1;
    req_valid = 1'b0;
  endtask

  task automatic wait_idle(int limit);
    int t = 0;
    while (n_out > 0 && t < limit) begin @(posedge clk); t++; end
    check(n_out == 0, "requests outstanding after drain wait");
  endtask

  function automatic int tcmd_of(int d);
    return M * ((d + 2) / M + 1);
  endfunction

  bit addr_used [int];

  initial begin
    int id, acc, d_act, d_col, exp_lat, seed, n;
    logic [ADDR_W-1:0] a;
    bit wr;
    for (int i = 0; i < 256; i++) begin id_busy[i] = 0; resp_cyc[i] = -1; end
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    // idle read, rank awake (it is still within the idle window after reset)
    send(0, ADDR_W'(6), '0, id, acc);
    wait (resp_cyc[id] >= 0);
    d_act = acc + 1;
    d_col = d_act + M;
    while (tcmd_of(d_col) < tcmd_of(d_act) + T_RCD * M) d_col++;
    exp_lat = tcmd_of(d_col) + CL * M + 5 * M - 4 + N_CHUNK - acc;
    check(resp_cyc[id] - acc == exp_lat, $sformatf("idle read latency %0d, expected %0d", resp_cyc[id] - acc, exp_lat));
    wait_idle(1000);
    seed = 7;
    for (int ph = 0; ph < 4; ph++) begin
      // write burst (only fresh addresses, so order between requests does not matter)
      n = 0;
      while (n < 60) begin
        a = ADDR_W'(($urandom % 2048) * 2);
        if (addr_used.exists(int'(a))) continue;
        addr_used[int'(a)] = 1;
        send(1, a, pattern_line(seed++), id, acc);
        n++;
      end
      wait_idle(20000);
      // reads of written and unwritten lines
      for (int k = 0; k < 150; k++) begin
        a = ADDR_W'(($urandom % 4096) * 2);
        send(0, a, '0, id, acc);
      end
      wait_idle(20000);
      repeat (80) @(posedge clk);
    end
    for (int d = 0; d < N_DIMM; d++) begin
      check(!s_ovf[d], "command entry overwritten");
      for (int r = 0; r < N_RANK; r++)
        check(rk_err[d][r] == 0, $sformatf("DRAM timing errors in rank %0d.%0d", d, r));
    end
    $display("events: act=%0d rd=%0d wr=%0d rb_stall=%0d ch_stall=%0d drain=%0d pd_in=%0d pd_out=%0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6], ev_cnt[7]);
    for (int i = 0; i < 8; i++) check(ev_cnt[i] > 0, $sformatf("event %0d never happened", i));
    check(n_rd_ok == 601 && n_wr_ok == 240, $sformatf("completed %0d reads, %0d writes", n_rd_ok, n_wr_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
