// tb_syb_dev_ctrl_if: feeds random command-buffer entries to the device control interface
// with a dev_tick every 3 bus clocks (a 1:3 divider) and checks that (a) the entry is taken (ent_re) exactly
// in a tick cycle, (b) in the next bus clock the rank bus shows the command and address with
// only the addressed rank's chip select low, or a NOP with no chip select when there was no
// entry, (c) the outputs hold for the whole device clock, and (d) rd_evt/wr_evt pulse for
// one bus clock together with a read or write command.
module tb_syb_dev_ctrl_if;
  import ddr_pkg::*;
  localparam int N_RANK = 2, M = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic              dev_tick = 1'b0, ent_valid = 1'b0, ent_re, rd_evt, wr_evt;
  syb_cmd_entry_t    ent = '0;
  logic [N_RANK-1:0] cke_lvl = '1, odt_lvl = '0, dev_cs_n, dev_cke, dev_odt;
  ddr_ca_t           dev_ca;
  syb_dev_ctrl_if #(.N_RANK(N_RANK)) dut (.*);

  initial begin
    bit             had;
    syb_cmd_entry_t e;
    logic [N_RANK-1:0] ck, od;
    ddr_ca_t        ca_hold;
    logic [N_RANK-1:0] cs_hold;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 1000; i++) begin
      // tick cycle
      @(negedge clk);
      dev_tick  = 1'b1;
      ent_valid = $urandom % 3 != 0;
      ent       = syb_cmd_entry_t'($urandom);
      ent.rank  = 2'($urandom % N_RANK);
      ent.rsvd  = '0;
      cke_lvl   = N_RANK'($urandom); odt_lvl = N_RANK'($urandom);
      #1;
      check(ent_re == ent_valid, "entry taken in the tick cycle");
      had = ent_valid; e = ent; ck = cke_lvl; od = odt_lvl;
      // following cycles of the device clock
      for (int k = 1; k < M; k++) begin
        @(negedge clk);
        dev_tick = 1'b0;
        ent_valid = $urandom % 2;
        #1;
        check(ent_re == 1'b0, "entry not taken outside a tick");
        if (k == 1) begin
          check(dev_cke == ck && dev_odt == od, "CKE/ODT forwarded");
          if (had) begin
            check(dev_ca.ras_n == e.ras_n && dev_ca.cas_n == e.cas_n && dev_ca.we_n == e.we_n &&
                  dev_ca.a == e.a && dev_ca.ba == e.ba, "command relayed");
            for (int r = 0; r < N_RANK; r++)
              check(dev_cs_n[r] == (int'(e.rank) != r), "chip select of the addressed rank only");
            check(rd_evt == (decode_cmd(e.ras_n, e.cas_n, e.we_n) == CMD_RD), "read event");
            check(wr_evt == (decode_cmd(e.ras_n, e.cas_n, e.we_n) == CMD_WR), "write event");
            if (rd_evt) n_rd++;
            if (wr_evt) n_wr++;
          end else begin
            check(dev_ca == CA_NOP && dev_cs_n == '1, "NOP without an entry");
            check(!rd_evt && !wr_evt, "no event without an entry");
          end
          ca_hold = dev_ca; cs_hold = dev_cs_n;
        end else begin
          check(dev_ca == ca_hold && dev_cs_n == cs_hold, "command held for the device clock");
          check(!rd_evt && !wr_evt, "events last one bus clock");
        end
      end
      ent_valid = 1'b0;
    end
    check(n_rd > 10 && n_wr > 10, "reads and writes relayed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
