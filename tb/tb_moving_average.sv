// tb_moving_average: random samples, some cycles without a sample, and a clear in the
// middle. The sum and the average are compared every cycle with a reference that keeps
// the last eight samples in a queue and adds them up directly.
module tb_moving_average;
  localparam int W = 16, WINDOW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, x_valid;
  logic [W-1:0] x, avg;
  logic [W+$clog2(WINDOW)-1:0] sum;

  moving_average #(.W(W), .WINDOW(WINDOW)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned win [$];

  always @(posedge clk) if (rst_n) begin
    longint unsigned s;
    s = 0;
    foreach (win[i]) s += win[i];
    checks++;
    if (sum != s || avg != W'(s / WINDOW)) begin
      failures++;
      $display("FAIL sum=%0d ref=%0d avg=%0d @%0t", sum, s, avg, $time);
    end
    if (clear) win.delete();
    else if (x_valid) begin
      win.push_back(x);
      if (win.size() > WINDOW) void'(win.pop_front());
    end
  end

  initial begin
    clear = 0; x_valid = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x_valid = $urandom_range(0, 3) != 0;
      x       = (i < 1500) ? W'($urandom()) : W'($urandom_range(0, 100));
      clear   = i == 1500;
    end
    @(negedge clk); x_valid = 0; clear = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
