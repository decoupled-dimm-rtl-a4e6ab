// syb_clk_div: 1:M device-clock divider of the sync-buffer.
//
// The sync-buffer receives only the channel (bus) clock and derives the slower DRAM device
// clock from it. For an integer ratio 1:M the document prescribes a simple frequency divider
// built from shift registers; this one is a one-hot ring of M flops rotating once per bus
// clock. Each device clock spans M bus clocks.
//
// Outputs (all registered, so the device clock is glitch free):
//   dev_clk   - device clock, high for the first ceil(M/2) bus clocks of each device clock
//   dev_phase - index 0..M-1 of the current bus clock within the device clock
//   dev_tick  - high in the last bus clock of a device clock; the bus clock edge that ends
//               such a cycle is the rising edge of dev_clk
// Reset puts the ring in phase 0 with dev_clk high. Every divider of a channel (one per
// sync-buffer, one in the memory controller) is reset together and so stays in step; the
// document gives no reset scheme, that is this design's choice. M >= 2.
module syb_clk_div #(
  parameter int M = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output logic                         dev_clk,
  output logic                         dev_tick,
  output logic [$clog2(M+1)-1:0]       dev_phase
);
  localparam int H = (M + 1) / 2;

  logic [M-1:0] ring, ring_nxt;

  assign ring_nxt = {ring[M-2:0], ring[M-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring    <= M'(1);
      dev_clk <= 1'b1;
    end else begin
      ring    <= ring_nxt;
      dev_clk <= |ring_nxt[H-1:0];
    end
  end

  assign dev_tick = ring[M-1];

  always_comb begin
    dev_phase = '0;
    for (int i = 0; i < M; i++)
      if (ring[i]) dev_phase = ($clog2(M+1))'(i);
  end

  initial assert (M >= 2) else $error("syb_clk_div: M must be at least 2");

endmodule
