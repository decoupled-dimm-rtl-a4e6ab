// tb_decoupled_dimm_top: end-to-end test of the decoupled-DIMM memory system at its default
// configuration (2 channels x 2 DIMMs x 2 ranks, 1:2 rate ratio, DDR3-1066 8-8-8 ranks).
// Every rank is a behavioural DDR3 rank model on its DIMM's rank bus. The test
//   1. measures the idle read latency of single reads and compares it with the value
//      worked out from the timing rules (command relay of one device clock, tRCD, CL, the
//      read-data pipelining rule, power-down exit when the rank was asleep);
//   2. streams reads over all ranks of the system and checks that a channel carries more
//      data than one rank bus could (channel utilisation above 1/M);
//   3. runs a long random mix of reads and writes, with write bursts that force the
//      controller into write-drain mode and idle gaps that put ranks into power-down, and
//      checks every returned line against a reference memory;
//   4. checks that no DRAM timing rule, rank-bus or channel collision, or command-buffer
//      overflow happened, and that every scheduler mechanism occurred at least once.
module tb_decoupled_dimm_top;
  import ddr_pkg::*;
  import tb_dram_pkg::*;

  localparam int N_CH = 2, N_DIMM = 2, N_RANK = 2, M = 2;
  localparam int CL = 8, T_RCD = 8, T_XP = 12;
  localparam int ADDR_W = 27;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid = 1'b0, req_ready, req_write = 1'b0;  // driven at falling edges
  logic [ADDR_W-1:0] req_addr = '0;
  logic [7:0]        req_id = '0;
  line_t             req_wdata = '0;
  logic              resp_valid [N_CH];
  logic [7:0]        resp_id    [N_CH];
  line_t             resp_rdata [N_CH];
  logic              wack_valid [N_CH];
  logic [7:0]        wack_id    [N_CH];
  mc_ev_t            mc_ev      [N_CH];
  logic              mc_drain   [N_CH];
  logic              dev_clk    [N_CH][N_DIMM];
  ddr_ca_t           dev_ca     [N_CH][N_DIMM];
  logic [N_RANK-1:0] dev_cs_n   [N_CH][N_DIMM];
  logic [N_RANK-1:0] dev_cke    [N_CH][N_DIMM];
  logic [N_RANK-1:0] dev_odt    [N_CH][N_DIMM];
  chunk_t            dev_dq_out [N_CH][N_DIMM];
  logic              dev_dq_oe  [N_CH][N_DIMM];
  chunk_t            dev_dq_in  [N_CH][N_DIMM];
  logic              bus_conflict, cmd_overflow;

  decoupled_dimm_top dut (.*);

  // ------------------------------------------------------------------ DRAM ranks
  chunk_t rk_dq  [N_CH][N_DIMM][N_RANK];
  logic   rk_oe  [N_CH][N_DIMM][N_RANK];
  int     rk_err [N_CH][N_DIMM][N_RANK];
  int     rk_act [N_CH][N_DIMM][N_RANK];
  int     rk_rd  [N_CH][N_DIMM][N_RANK];
  int     rk_wr  [N_CH][N_DIMM][N_RANK];
  int     rk_pd  [N_CH][N_DIMM][N_RANK];

  for (genvar c = 0; c < N_CH; c++) begin : g_c
    for (genvar d = 0; d < N_DIMM; d++) begin : g_d
      for (genvar r = 0; r < N_RANK; r++) begin : g_r
        dram_rank_model #(.CH(c), .DIMM(d), .RANK(r)) u_rank (
          .dev_clk(dev_clk[c][d]), .ca(dev_ca[c][d]), .cs_n(dev_cs_n[c][d][r]),
          .cke(dev_cke[c][d][r]), .dq_in(dev_dq_out[c][d]), .dq_in_oe(dev_dq_oe[c][d]),
          .dq_out(rk_dq[c][d][r]), .dq_oe(rk_oe[c][d][r]), .errors(rk_err[c][d][r]),
          .n_act(rk_act[c][d][r]), .n_rd(rk_rd[c][d][r]), .n_wr(rk_wr[c][d][r]), .n_pd(rk_pd[c][d][r])
        );
      end
      always_comb begin
        dev_dq_in[c][d] = '0;
        for (int r = 0; r < N_RANK; r++)
          if (rk_oe[c][d][r]) dev_dq_in[c][d] = dev_dq_in[c][d] | rk_dq[c][d][r];
      end
    end
  end

  // ------------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int cyc = 0;
  int ev_cnt [N_CH][8];
  int rankbus_collisions = 0;
  int rid_m, wid_m;
  int chan_busy [N_CH];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  for (genvar c = 0; c < N_CH; c++) begin : g_mon
    always @(posedge clk) if (!rst_n) begin
      for (int i = 0; i < 8; i++) ev_cnt[c][i] <= 0;
    end else begin
      if (mc_ev[c].act)           ev_cnt[c][0] <= ev_cnt[c][0] + 1;
      if (mc_ev[c].rd)            ev_cnt[c][1] <= ev_cnt[c][1] + 1;
      if (mc_ev[c].wr)            ev_cnt[c][2] <= ev_cnt[c][2] + 1;
      if (mc_ev[c].rankbus_stall) ev_cnt[c][3] <= ev_cnt[c][3] + 1;
      if (mc_ev[c].chbus_stall)   ev_cnt[c][4] <= ev_cnt[c][4] + 1;
      if (mc_ev[c].drain_on)      ev_cnt[c][5] <= ev_cnt[c][5] + 1;
      if (mc_ev[c].pd_enter)      ev_cnt[c][6] <= ev_cnt[c][6] + 1;
      if (mc_ev[c].pd_exit)       ev_cnt[c][7] <= ev_cnt[c][7] + 1;
    end
    for (genvar d = 0; d < N_DIMM; d++) begin : g_rb
      always @(posedge clk)
        if (rst_n && rk_oe[c][d][0] && rk_oe[c][d][1]) rankbus_collisions <= rankbus_collisions + 1;
    end
  end

  // Independent decode of a line address (cache-line interleaving, XOR bank mapping).
  function automatic line_t expected_default(logic [ADDR_W-1:0] a);
    int ch   = int'(a[0]);
    int dimm = int'(a[1]);
    int rank = int'(a[2]);
    int row  = int'(a[26:13]);
    int bank = int'(a[5:3]) ^ (row & 7);
    int col  = int'(a[12:6]) * 8;
    return default_line(ch, dimm, rank, bank, row, col);
  endfunction

  line_t       refm [int];
  line_t       exp_data [256];
  bit          id_busy [256];
  bit          id_is_wr [256];
  int          id_addr [256];
  int          addr_busy [int];
  int          resp_cyc [256];
  int          n_out = 0;
  int          next_id = 0;
  int          n_rd_ok = 0, n_wr_ok = 0;

  function automatic line_t ref_read(logic [ADDR_W-1:0] a);
    if (refm.exists(int'(a))) return refm[int'(a)];
    return expected_default(a);
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N_CH; c++) begin
      if (resp_valid[c]) begin
        rid_m = int'(resp_id[c]);
        check(id_busy[rid_m] && !id_is_wr[rid_m], $sformatf("unexpected read response id %0d", rid_m));
        check(resp_rdata[c] == exp_data[rid_m], $sformatf("read data mismatch id %0d addr %h", rid_m, id_addr[rid_m]));
        check(int'(id_addr[rid_m] & 1) == c, "read returned on wrong channel");
        resp_cyc[rid_m] = cyc;
        chan_busy[c] += N_CHUNK;
        id_busy[rid_m] = 0;
        addr_busy[id_addr[rid_m]]--;
        n_out--;
        n_rd_ok++;
      end
      if (wack_valid[c]) begin
        wid_m = int'(wack_id[c]);
        check(id_busy[wid_m] && id_is_wr[wid_m], $sformatf("unexpected write ack id %0d", wid_m));
        id_busy[wid_m] = 0;
        addr_busy[id_addr[wid_m]]--;
        n_out--;
        n_wr_ok++;
      end
    end
  end

  // Send one request; returns the id and the cycle in which it was accepted.
  task automatic send(bit wr, logic [ADDR_W-1:0] a, line_t data, output int id, output int acc);
    while (id_busy[next_id]) next_id = (next_id + 1) % 256;
    id = next_id;
    next_id = (next_id + 1) % 256;
    id_busy[id]  = 1;
    id_is_wr[id] = wr;
    id_addr[id]  = int'(a);
    if (!addr_busy.exists(int'(a))) addr_busy[int'(a)] = 0;
    addr_busy[int'(a)]++;
    n_out++;
    if (wr) begin
      refm[int'(a)] = data;
    end else begin
      exp_data[id] = ref_read(a);
    end
    @(negedge clk);
    req_valid = 1'b1;
    req_write = wr;
    req_addr  = a;
    req_id    = 8'(id);
    req_wdata = data;
    #1;                                 // let the channel decode settle
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
    while (n_out > 0 && t < limit) begin
      @(posedge clk);
      t++;
    end
    check(n_out == 0, "requests still outstanding after drain wait");
  endtask

  function automatic bit busy_addr(logic [ADDR_W-1:0] a);
    return addr_busy.exists(int'(a)) && addr_busy[int'(a)] > 0;
  endfunction

  // Expected idle read latency, in bus clocks from acceptance to the response.
  function automatic int tcmd_of(int d);          // decision cycle -> device command time
    int t = d + 1;
    return M * ((t + 1) / M + 1);
  endfunction
  function automatic int idle_latency(int acc, bit asleep);
    int d_act = acc + 1 + (asleep ? T_XP : 0);
    int t_act = tcmd_of(d_act);
    int d_col = d_act + M;
    while (tcmd_of(d_col) < t_act + T_RCD * M) d_col++;
    return tcmd_of(d_col) + CL * M + 5 * M - 4 + N_CHUNK - acc;
  endfunction

  // ------------------------------------------------------------------ stimulus
  initial begin
    int id, acc, lat, exp_lat, seed, nops, cyc0, busy0;
    logic [ADDR_W-1:0] a;
    line_t d;
    bit asleep;
    int ev_tot [8];
    for (int i = 0; i < 256; i++) begin id_busy[i] = 0; resp_cyc[i] = -1; end
    for (int c = 0; c < N_CH; c++) chan_busy[c] = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (40) @(posedge clk);   // ranks fall asleep

    // 1. idle read latency, asleep and awake, both device-clock phases
    for (int k = 0; k < 4; k++) begin
      a = ADDR_W'(k * 8 + 2);        // channel 0, DIMM 1, rank 0
      asleep = (k == 0);
      if (k == 3) @(posedge clk);    // other phase
      send(0, a, '0, id, acc);
      wait (resp_cyc[id] >= 0);
      lat = resp_cyc[id] - acc;
      exp_lat = idle_latency(acc, asleep);
      check(lat == exp_lat, $sformatf("idle read latency %0d, expected %0d", lat, exp_lat));
      $display("idle read %0d: latency %0d bus clocks (expected %0d)", k, lat, exp_lat);
      repeat (asleep ? 2 : 0) @(posedge clk);
    end
    wait_idle(2000);

    // 2. read stream over all ranks, channel utilisation
    cyc0 = cyc;
    busy0 = chan_busy[0];
    for (int k = 0; k < 256; k++) begin
      a = ADDR_W'(32'h1000 + k);
      send(0, a, '0, id, acc);
    end
    wait_idle(5000);
    begin
      real util;
      util = real'(chan_busy[0] - busy0) / real'(cyc - cyc0);
      $display("read stream: channel 0 utilisation %0.2f", util);
      check(util > 1.0 / M, "channel utilisation not above one rank bus' share");
    end

    // 3. random mix with write bursts and idle gaps
    seed = 1;
    for (int phase = 0; phase < 6; phase++) begin
      // write burst: forces write drain
      for (int k = 0; k < 90; k++) begin
        a = ADDR_W'(($urandom % 512) * 2 + (k & 1)) ;
        if (busy_addr(a)) continue;
        d = pattern_line(seed++);
        send(1, a, d, id, acc);
      end
      // mixed traffic
      nops = 0;
      while (nops < 200) begin
        bit wr;
        wr = ($urandom % 3) == 0;
        a = ADDR_W'(($urandom % 512) * 2 + ($urandom % 2));
        if (busy_addr(a)) continue;
        d = pattern_line(seed++);
        send(wr, a, d, id, acc);
        nops++;
      end
      wait_idle(20000);
      repeat (60) @(posedge clk);    // idle: ranks power down
    end

    // 4. final checks
    repeat (50) @(posedge clk);
    check(bus_conflict == 1'b0, "channel data bus driven by two sources");
    check(cmd_overflow == 1'b0, "sync-buffer command entry overwritten");
    check(rankbus_collisions == 0, "two ranks drove one rank bus together");
    for (int c = 0; c < N_CH; c++)
      for (int dd = 0; dd < N_DIMM; dd++)
        for (int r = 0; r < N_RANK; r++) begin
          check(rk_err[c][dd][r] == 0, $sformatf("DRAM timing violations in rank %0d.%0d.%0d: %0d", c, dd, r, rk_err[c][dd][r]));
          check(rk_rd[c][dd][r] > 0 && rk_wr[c][dd][r] > 0 && rk_pd[c][dd][r] > 0,
                $sformatf("rank %0d.%0d.%0d not exercised", c, dd, r));
        end
    for (int i = 0; i < 8; i++) ev_tot[i] = ev_cnt[0][i] + ev_cnt[1][i];
    $display("events: act=%0d rd=%0d wr=%0d rankbus_stall=%0d chbus_stall=%0d drain_on=%0d pd_enter=%0d pd_exit=%0d",
             ev_tot[0], ev_tot[1], ev_tot[2], ev_tot[3], ev_tot[4], ev_tot[5], ev_tot[6], ev_tot[7]);
    $display("reads checked=%0d writes acked=%0d", n_rd_ok, n_wr_ok);
    for (int i = 0; i < 8; i++) check(ev_tot[i] > 0, $sformatf("scheduler mechanism %0d never happened", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
