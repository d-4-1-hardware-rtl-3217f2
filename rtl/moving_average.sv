// moving_average: statistic counter computing a sliding-window sum and average.
//
// Each valid sample x_t enters a circular buffer of WINDOW entries; the running sum is
// updated with one addition and one subtraction, Sum_{t+1} = Sum_t - x_{t-WINDOW} + x_t,
// and the average is the sum divided by WINDOW (a right shift, WINDOW being a power of
// two). Until WINDOW samples have arrived the missing ones count as zero.
//
// Timing: sum and avg change at the clock edge that takes a sample. WINDOW = 8 and the
// update rule follow the document; the sample width (16 bits) is this design's choice.
module moving_average #(
  parameter int W      = 16,
  parameter int WINDOW = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         x_valid,
  input  logic [W-1:0]                 x,
  output logic [W+$clog2(WINDOW)-1:0]  sum,
  output logic [W-1:0]                 avg
);
  localparam int AW = $clog2(WINDOW);
  logic [WINDOW-1:0][W-1:0] buf_q;
  logic [AW-1:0]            ptr_q;
  logic [W+AW-1:0]          sum_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      buf_q <= '0;
      ptr_q <= '0;
      sum_q <= '0;
    end else if (clear) begin
      buf_q <= '0;
      ptr_q <= '0;
      sum_q <= '0;
    end else if (x_valid) begin
      sum_q        <= sum_q - (W+AW)'(buf_q[ptr_q]) + (W+AW)'(x);
      buf_q[ptr_q] <= x;
      ptr_q        <= ptr_q + 1'b1;
    end

  assign sum = sum_q;
  assign avg = W'(sum_q >> AW);
endmodule
