// tb_syb_cmd_buffer: random test of the one-entry command buffer against a reference model.
// A write fills the entry (rdata and valid next cycle), a read empties it, a write and a
// read in the same cycle replace the entry. The overflow flag must rise only when a valid
// entry is overwritten without being read, so it must stay clear here: overwrites are never
// generated (the relay protocol never does this and the built-in assertion would stop the run).
module tb_syb_cmd_buffer;
  import ddr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic           we = 1'b0, re = 1'b0, valid, overflow;
  syb_cmd_entry_t wdata = '0, rdata;
  syb_cmd_buffer dut (.*);

  bit             m_valid;
  syb_cmd_entry_t m_data;
  bit             m_ovf;

  initial begin
    m_valid = 0; m_data = '0; m_ovf = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(valid == m_valid, "valid flag");
      if (m_valid) check(rdata == m_data, "entry contents");
      check(overflow == m_ovf, "overflow flag");
      re    = m_valid && ($urandom % 2);
      we    = ($urandom % 3 == 0) && (!m_valid || re);
      wdata = syb_cmd_entry_t'($urandom);
      @(posedge clk);
      if (we) begin
        if (m_valid && !re) m_ovf = 1;
        m_valid = 1; m_data = wdata;
      end else if (re) m_valid = 0;
    end
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
