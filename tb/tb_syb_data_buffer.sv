// tb_syb_data_buffer: random writes and reads of the read-data and write-data entries of the
// sync-buffer data buffer, compared with a reference copy. Writes take effect at the clock
// edge; reads are combinational from the current contents. Both entries are exercised in
// the same cycles to show they are independent.
module tb_syb_data_buffer;
  import ddr_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       rd_we = 1'b0, wr_we = 1'b0;
  logic [1:0] rd_widx = '0, rd_ridx = '0, wr_widx = '0, wr_ridx = '0;
  chunk_t     rd_wdata = '0, wr_wdata = '0, rd_rdata, wr_rdata;
  syb_data_buffer dut (.*);

  chunk_t m_rd [4], m_wr [4];

  function automatic chunk_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    // fill both entries first so that every read below has a defined reference
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      rd_we = 1; rd_widx = 2'(k); rd_wdata = rnd(); m_rd[k] = rd_wdata;
      wr_we = 1; wr_widx = 2'(k); wr_wdata = rnd(); m_wr[k] = wr_wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rd_ridx = 2'($urandom); wr_ridx = 2'($urandom);
      #1;
      check(rd_rdata == m_rd[rd_ridx], "read-data entry contents");
      check(wr_rdata == m_wr[wr_ridx], "write-data entry contents");
      rd_we = $urandom % 2; rd_widx = 2'($urandom); rd_wdata = rnd();
      wr_we = $urandom % 2; wr_widx = 2'($urandom); wr_wdata = rnd();
      @(posedge clk);
      if (rd_we) m_rd[rd_widx] = rd_wdata;
      if (wr_we) m_wr[wr_widx] = wr_wdata;
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
