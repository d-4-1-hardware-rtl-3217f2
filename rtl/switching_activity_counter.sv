// switching_activity_counter: counts bit transitions on a monitored bus.
//
// Each sampled cycle the bus is compared with its previous sampled value; the number
// of bits that changed (population count of the XOR) is added to a counter, giving a
// fine-grain measure of switching activity for energy monitoring. The first sample
// after reset or clear only loads the reference value.
//
// Timing: one sample per cycle while enable is high; count updates at the clock edge.
// The function follows the document; widths (32-bit bus, 32-bit counter) and the
// saturation of the counter at all-ones are this design's choices.
module switching_activity_counter #(
  parameter int W  = 32,
  parameter int CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          enable,
  input  logic [W-1:0]  bus,
  output logic [CW-1:0] count
);
  logic [W-1:0]  prev_q;
  logic          primed_q;
  logic [CW-1:0] cnt_q;
  logic [$clog2(W+1)-1:0] toggles;

  always_comb begin
    toggles = '0;
    for (int i = 0; i < W; i++)
      toggles = toggles + $bits(toggles)'(bus[i] ^ prev_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev_q   <= '0;
      primed_q <= 1'b0;
      cnt_q    <= '0;
    end else if (clear) begin
      primed_q <= 1'b0;
      cnt_q    <= '0;
    end else if (enable) begin
      prev_q   <= bus;
      primed_q <= 1'b1;
      if (primed_q)
        cnt_q <= (cnt_q > '1 - CW'(toggles)) ? '1 : cnt_q + CW'(toggles);
    end

  assign count = cnt_q;
endmodule
