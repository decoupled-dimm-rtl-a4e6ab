// tb_syb_clk_div: checks the sync-buffer clock divider at the default 1:2 ratio and at 1:3
// and 1:4. For each instance it counts, over a long run, the device-clock rising edges and
// the dev_tick pulses, and checks that both repeat exactly every M bus clocks, that dev_tick
// comes in the bus clock just before each device-clock rising edge, that the device clock is
// high for ceil(M/2) bus clocks per period, and that dev_phase counts 0..M-1.
module tb_syb_clk_div;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       dclk2, tick2, dclk3, tick3, dclk4, tick4;
  logic [1:0] ph2, ph3;
  logic [2:0] ph4;
  syb_clk_div #(.M(2)) u2 (.clk, .rst_n, .dev_clk(dclk2), .dev_tick(tick2), .dev_phase(ph2));
  syb_clk_div #(.M(3)) u3 (.clk, .rst_n, .dev_clk(dclk3), .dev_tick(tick3), .dev_phase(ph3));
  syb_clk_div #(.M(4)) u4 (.clk, .rst_n, .dev_clk(dclk4), .dev_tick(tick4), .dev_phase(ph4));

  // Per-instance monitor, sampled mid-cycle.
  task automatic sample(int m, output logic dclk, output logic tick, output int ph);
    case (m)
      2:       begin dclk = dclk2; tick = tick2; ph = int'(ph2); end
      3:       begin dclk = dclk3; tick = tick3; ph = int'(ph3); end
      default: begin dclk = dclk4; tick = tick4; ph = int'(ph4); end
    endcase
  endtask

  task automatic watch(int m, int n);
    int last_rise, last_tick, high, prev, prev_tick, p_prev, ph;
    logic dclk, tick;
    last_rise = -1; last_tick = -1; high = 0; prev = 1; prev_tick = 0; p_prev = -1;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      sample(m, dclk, tick, ph);
      if (dclk && !prev) begin
        if (last_rise >= 0) check(c - last_rise == m, $sformatf("M=%0d device clock period %0d", m, c - last_rise));
        check(prev_tick == 1, $sformatf("M=%0d dev_tick not just before the device-clock edge", m));
        if (last_rise >= 0) check(high == (m + 1) / 2, $sformatf("M=%0d high time %0d", m, high));
        last_rise = c;
        high = 0;
      end
      if (dclk) high++;
      if (tick) begin
        if (last_tick >= 0) check(c - last_tick == m, $sformatf("M=%0d dev_tick period %0d", m, c - last_tick));
        last_tick = c;
      end
      if (p_prev >= 0) check(int'(ph) == (p_prev + 1) % m, $sformatf("M=%0d phase sequence", m));
      p_prev = int'(ph);
      prev = dclk;
      prev_tick = tick;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      watch(2, 200);
      watch(3, 200);
      watch(4, 200);
    join
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
