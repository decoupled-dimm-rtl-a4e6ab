// tb_sync_buffer: one sync-buffer (M=2, two ranks, CL=8, CWL=6) driven from the channel side
// by the test bench and answered on the rank-bus side by a simple responder.
//   * Command relay: a command put on the channel in bus clock t must appear on the rank bus,
//     with the right rank selected, at the next device-clock edge after the bus clock in
//     which it was captured, i.e. 2 or 3 bus clocks later (one device clock).
//   * Reads: the responder drives chunk k during bus clocks Tc+CL*M+k*M .. +M-1 (Tc = first
//     bus clock of the device command); the channel must carry chunk j in bus clock
//     Tc+CL*M+5*M-4+j, so the last chunk leaves one device clock after it arrived.
//   * Writes: the test bench drives chunk k on the channel in bus clock Tc+CWL*M-2+k; the rank
//     bus must carry it during Tc+CWL*M+k*M .. +M-1.
// Commands are spaced so that bursts do not overlap, as the memory controller guarantees.
module tb_sync_buffer;
  import ddr_pkg::*;
  localparam int M = 2, N_RANK = 2, CL = 8, CWL = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ddr_ca_t           bus_ca = CA_NOP, dev_ca;
  logic [N_RANK-1:0] bus_cs_n = '1, bus_cke = '1, bus_odt = '0;
  logic [N_RANK-1:0] dev_cs_n, dev_cke, dev_odt;
  chunk_t            bus_dq_in = '0, bus_dq_out, dev_dq_in = '0, dev_dq_out;
  logic              bus_dq_oe, dev_clk, dev_dq_oe, cmd_overflow;
  sync_buffer #(.M(M), .N_RANK(N_RANK), .CL(CL), .CWL(CWL)) dut (.*);

  function automatic chunk_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  int      n_rd = 0, n_wr = 0, n_act = 0;
  chunk_t  data [4];

  initial begin
    int t, tc, r, kind, ko, kr, kd, jo;
    ddr_cmd_e c;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 300; i++) begin
      // idle gap of random length and phase
      repeat (1 + $urandom % 3) begin @(negedge clk); cyc++; end
      kind = $urandom % 3;
      c = kind == 0 ? CMD_ACT : kind == 1 ? CMD_RD : CMD_WR;
      r = $urandom % N_RANK;
      for (int k = 0; k < 4; k++) data[k] = rnd();
      // command on the channel for one bus clock
      bus_ca = encode_cmd(c, BA_W'($urandom), ROW_W'($urandom));
      bus_cs_n = '1;
      bus_cs_n[r] = 1'b0;
      t = cyc;
      @(negedge clk); cyc++;
      bus_ca = CA_NOP; bus_cs_n = '1;
      // wait for the relayed command
      tc = -1;
      for (int w = 0; w < 3 * M && tc < 0; w++) begin
        #1;
        if (dev_cs_n != '1) tc = cyc;
        else begin @(negedge clk); cyc++; end
      end
      check(tc >= 0, "command not relayed");
      if (tc < 0) continue;
      check(tc - t >= 2 && tc - t <= M + 1, $sformatf("command relay took %0d bus clocks", tc - t));
      check(dev_cs_n[r] == 1'b0 && $countones(~dev_cs_n) == 1, "rank select");
      check(decode_cmd(dev_ca.ras_n, dev_ca.cas_n, dev_ca.we_n) == c, "command relayed");
      check(dev_clk == 1'b1, "command starts with a device clock high phase");
      if (c == CMD_ACT) n_act++;
      // data phase, bus clock by bus clock from tc
      for (int x = 0; x < CL * M + 5 * M + 2; x++) begin
        ko = x - (CWL * M - 2);                     // write chunk on the channel
        kr = (x - CL * M) / M;                      // read chunk on the rank bus
        kd = (x - CWL * M) / M;                     // write chunk expected on the rank bus
        jo = x - (CL * M + 5 * M - 4);              // read chunk expected on the channel
        bus_dq_in = (c == CMD_WR && ko >= 0 && ko < 4) ? data[ko] : rnd();
        dev_dq_in = (c == CMD_RD && x >= CL * M && kr < 4) ? data[kr] : rnd();
        #1;
        if (c == CMD_RD) begin
          if (jo >= 0 && jo < 4) check(bus_dq_oe && bus_dq_out == data[jo], $sformatf("read chunk %0d at relative clock %0d", jo, x));
          else check(!bus_dq_oe, "channel driven outside the read burst");
          check(!dev_dq_oe, "rank bus driven during a read");
        end else if (c == CMD_WR) begin
          if (x >= CWL * M && kd < 4) check(dev_dq_oe && dev_dq_out == data[kd], $sformatf("write chunk %0d at relative clock %0d", kd, x));
          else check(!dev_dq_oe, "rank bus driven outside the write burst");
          check(!bus_dq_oe, "channel driven during a write");
        end
        @(negedge clk); cyc++;
      end
      if (c == CMD_RD) n_rd++;
      if (c == CMD_WR) n_wr++;
    end
    check(!cmd_overflow, "command entry overwritten");
    check(n_rd > 30 && n_wr > 30 && n_act > 30, "all command types relayed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
