// tb_syb_bus_data_if: checks the channel-side data timing of the sync-buffer at M=2, CL=8,
// CWL=6. After a read event in bus clock T the interface must drive read-buffer slot j on the
// channel in bus clock T+CL*M+5*M-4+j (j = 0..3), so that the last chunk leaves one device
// clock after the rank delivered it, and keep the output enable low otherwise. After a write
// event in bus clock T it must store the channel data of bus clock T+CWL*M-2+k into
// write-buffer slot k.
module tb_syb_bus_data_if;
  import ddr_pkg::*;
  localparam int M = 2, CL = 8, CWL = 6;
  localparam int RD_OFF = CL * M + 5 * M - 4, WR_OFF = CWL * M - 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       rd_evt = 1'b0, wr_evt = 1'b0, bus_dq_oe, wrbuf_we;
  chunk_t     bus_dq_in = '0, bus_dq_out, wrbuf_wdata, rdbuf_rdata;
  logic [1:0] wrbuf_idx, rdbuf_idx;
  syb_bus_data_if #(.M(M), .CL(CL), .CWL(CWL)) dut (.*);

  chunk_t rbuf [4];
  assign rdbuf_rdata = rbuf[rdbuf_idx];

  int     rd_j  [int];
  int     wr_k  [int];
  chunk_t wr_d  [int];
  int     n_out = 0, n_in = 0;

  function automatic chunk_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) rbuf[k] = rnd();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cyc++;
      rd_evt = 0; wr_evt = 0;
      if (i < 2900 && (i % 8) == 0) begin
        if ($urandom % 2) begin
          rd_evt = 1;
          for (int j = 0; j < 4; j++) rd_j[cyc + RD_OFF + j] = j;
        end else begin
          wr_evt = 1;
          for (int k = 0; k < 4; k++) begin
            wr_k[cyc + WR_OFF + k] = k;
            wr_d[cyc + WR_OFF + k] = rnd();
          end
        end
      end
      bus_dq_in = wr_d.exists(cyc) ? wr_d[cyc] : rnd();
      #1;
      if (rd_j.exists(cyc)) begin
        n_out++;
        check(bus_dq_oe && bus_dq_out == rbuf[rd_j[cyc]], $sformatf("read chunk %0d not on the channel at clock %0d", rd_j[cyc], cyc));
      end else
        check(!bus_dq_oe, $sformatf("channel driven at clock %0d", cyc));
      if (wr_k.exists(cyc)) begin
        n_in++;
        check(wrbuf_we && int'(wrbuf_idx) == wr_k[cyc] && wrbuf_wdata == wr_d[cyc],
              $sformatf("write chunk %0d not stored at clock %0d", wr_k[cyc], cyc));
      end else
        check(!wrbuf_we, $sformatf("unexpected write-buffer store at clock %0d", cyc));
    end
    check(n_out > 200 && n_in > 200, "bursts exercised");
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
