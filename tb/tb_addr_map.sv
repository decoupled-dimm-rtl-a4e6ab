// tb_addr_map: decodes random line addresses (plus the all-zero and all-one corners) with the
// default 2-channel, 2-DIMM, 2-rank, 8-bank map and compares every field with an independent
// bit-slice decode: channel, DIMM, rank and bank in the low bits (cache-line interleaving),
// then the 7-bit line index within the row, then the row; the bank is XORed with the low row
// bits. Also checks that consecutive lines rotate over both channels first.
module tb_addr_map;
  import ddr_pkg::*;
  localparam int ADDR_W = 27;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [ADDR_W-1:0] line_addr = '0;
  logic [1:0]        ch, dimm, rank;
  logic [BA_W-1:0]   bank;
  logic [ROW_W-1:0]  row;
  logic [9:0]        col;
  addr_map dut (.*);

  initial begin
    logic [ADDR_W-1:0] a;
    for (int i = 0; i < 3000; i++) begin
      a = (i == 0) ? '0 : (i == 1) ? '1 : ADDR_W'({$urandom, $urandom});
      line_addr = a;
      #1;
      check(ch == 2'(a[0]) && dimm == 2'(a[1]) && rank == 2'(a[2]), $sformatf("ch/dimm/rank of %h", a));
      check(row == a[26:13], $sformatf("row of %h", a));
      check(bank == (a[5:3] ^ a[15:13]), $sformatf("bank of %h", a));
      check(col == {a[12:6], 3'b000}, $sformatf("column of %h", a));
      if (i < 100) begin
        line_addr = ADDR_W'(i);
        #1;
        check(int'(ch) == i % 2, "consecutive lines alternate channels");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
