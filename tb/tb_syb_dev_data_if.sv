// tb_syb_dev_data_if: checks the device-side data timing of the sync-buffer at M=2, CL=8,
// CWL=6. A read event in bus clock T (the first bus clock of the device read command) makes
// the rank drive chunk k during bus clocks T+CL*M+k*M .. +M-1; the interface must store chunk
// k in read-buffer slot k in the last of those bus clocks. A write event in bus clock T must
// put write-buffer slot k on the rank bus during bus clocks T+CWL*M+k*M .. +M-1 with the output
// enable high, and release the bus at T+CWL*M+4*M. Reads and writes are overlapped at random.
module tb_syb_dev_data_if;
  import ddr_pkg::*;
  localparam int M = 2, CL = 8, CWL = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       rd_evt = 1'b0, wr_evt = 1'b0, dq_oe, rdbuf_we;
  chunk_t     dq_in = '0, dq_out, rdbuf_wdata, wrbuf_rdata;
  logic [1:0] rdbuf_idx, wrbuf_idx;
  syb_dev_data_if #(.M(M), .CL(CL), .CWL(CWL)) dut (.*);

  chunk_t wbuf [4];
  assign wrbuf_rdata = wbuf[wrbuf_idx];

  // Expected activity per future bus clock.
  chunk_t rd_drive [int];     // chunk the rank drives in that clock
  int     rd_cap_k [int];     // slot that must be stored in that clock
  int     wr_k     [int];     // slot that must be on the rank bus in that clock
  int     n_rd = 0, n_wr = 0, n_cap = 0, n_drv = 0;

  function automatic chunk_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) wbuf[k] = rnd();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cyc++;
      // stimulus for this bus clock; a new burst only when the last one has finished
      rd_evt = 0; wr_evt = 0;
      if (i < 2900 && (i % 16) == 0) begin
        if ($urandom % 2) begin
          rd_evt = 1; n_rd++;
          for (int k = 0; k < 4; k++) begin
            chunk_t c = rnd();
            for (int b = 0; b < M; b++) rd_drive[cyc + CL*M + k*M + b] = c;
            rd_cap_k[cyc + CL*M + k*M + M - 1] = k;
          end
        end else begin
          wr_evt = 1; n_wr++;
          for (int k = 0; k < 4; k++)
            for (int b = 0; b < M; b++) wr_k[cyc + CWL*M + k*M + b] = k;
        end
      end
      dq_in = rd_drive.exists(cyc) ? rd_drive[cyc] : rnd();
      #1;
      if (rd_cap_k.exists(cyc)) begin
        n_cap++;
        check(rdbuf_we && int'(rdbuf_idx) == rd_cap_k[cyc] && rdbuf_wdata == rd_drive[cyc],
              $sformatf("read chunk %0d not stored at clock %0d", rd_cap_k[cyc], cyc));
      end else
        check(!rdbuf_we, $sformatf("unexpected read-buffer write at clock %0d", cyc));
      if (wr_k.exists(cyc)) begin
        n_drv++;
        check(dq_oe && dq_out == wbuf[wr_k[cyc]], $sformatf("write chunk %0d not driven at clock %0d", wr_k[cyc], cyc));
      end else
        check(!dq_oe, $sformatf("rank bus driven at clock %0d", cyc));
    end
    check(n_rd > 20 && n_wr > 20 && n_cap == 4 * n_rd && n_drv == 4 * M * n_wr, "bursts exercised");
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
