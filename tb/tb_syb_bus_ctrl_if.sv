// tb_syb_bus_ctrl_if: drives random channel command/address words, with at most one rank
// selected, into the bus control interface and checks the command-buffer entry it builds:
// written only for a selected rank and a command other than NOP, with the rank number, the
// selected rank's CKE/ODT and the command and address fields copied through. CKE and ODT of
// all ranks must appear on cke_lvl/odt_lvl one bus clock later.
module tb_syb_bus_ctrl_if;
  import ddr_pkg::*;
  localparam int N_RANK = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_we = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ddr_ca_t           bus_ca = CA_NOP;
  logic [N_RANK-1:0] bus_cs_n = '1, bus_cke = '1, bus_odt = '0, cke_lvl, odt_lvl;
  logic              ent_we;
  syb_cmd_entry_t    ent_wdata;
  syb_bus_ctrl_if #(.N_RANK(N_RANK)) dut (.*);

  initial begin
    logic [N_RANK-1:0] cke_prev, odt_prev;
    int r;
    bit sel, nop;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    cke_prev = bus_cke; odt_prev = bus_odt;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(cke_lvl == cke_prev && odt_lvl == odt_prev, "CKE/ODT levels one clock late");
      bus_ca.ras_n = $urandom % 2; bus_ca.cas_n = $urandom % 2; bus_ca.we_n = $urandom % 2;
      bus_ca.a = ROW_W'($urandom); bus_ca.ba = BA_W'($urandom);
      sel = $urandom % 4 != 0;
      r = $urandom % N_RANK;
      bus_cs_n = '1;
      if (sel) bus_cs_n[r] = 1'b0;
      bus_cke = N_RANK'($urandom); bus_odt = N_RANK'($urandom);
      cke_prev = bus_cke; odt_prev = bus_odt;
      #1;
      nop = bus_ca.ras_n && bus_ca.cas_n && bus_ca.we_n;
      check(ent_we == (sel && !nop), "entry written only for a selected non-NOP command");
      if (ent_we) begin
        n_we++;
        check(int'(ent_wdata.rank) == r, "rank number");
        check(ent_wdata.cke == bus_cke[r] && ent_wdata.odt == bus_odt[r], "selected CKE/ODT");
        check(ent_wdata.ras_n == bus_ca.ras_n && ent_wdata.cas_n == bus_ca.cas_n &&
              ent_wdata.we_n == bus_ca.we_n, "command bits");
        check(ent_wdata.a == bus_ca.a && ent_wdata.ba == bus_ca.ba, "address bits");
        check(ent_wdata.cs_n == 1'b0 && ent_wdata.rsvd == '0, "fixed fields");
      end
    end
    check(n_we > 100, "too few entries written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
