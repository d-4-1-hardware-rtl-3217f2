// tb_switching_activity_counter: random bus values with random enable and clear; the
// count is compared every cycle with a model that adds the number of toggled bits
// between consecutive enabled samples. A final directed part forces the count close to
// its maximum to check that it saturates.
module tb_switching_activity_counter;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, enable;
  logic [W-1:0] bus;
  logic [31:0] count;

  switching_activity_counter #(.W(W), .CW(32)) dut (.*);

  int checks = 0, failures = 0;
  longint m_cnt = 0;
  logic [W-1:0] m_prev;
  bit m_primed = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (count != 32'(m_cnt)) begin
      failures++;
      $display("FAIL count=%0d ref=%0d @%0t", count, m_cnt, $time);
    end
    if (clear) begin m_cnt = 0; m_primed = 0; end
    else if (enable) begin
      if (m_primed) begin
        m_cnt += $countones(bus ^ m_prev);
        if (m_cnt > 64'hFFFF_FFFF) m_cnt = 64'hFFFF_FFFF;
      end
      m_prev = bus; m_primed = 1;
    end
  end

  initial begin
    clear = 0; enable = 0; bus = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      enable = $urandom_range(0, 4) != 0;
      bus    = (i % 3 == 0) ? ~bus : $urandom();
      clear  = i == 1000;
    end
    // saturation: force the counter near all ones through the model and the design
    @(negedge clk); enable = 0;
    @(posedge clk); #1;
    dut.cnt_q = 32'hFFFF_FFF0; m_cnt = 64'hFFFF_FFF0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); enable = 1; bus = ~bus;
    end
    @(negedge clk); enable = 0;
    @(negedge clk);
    checks++;
    if (count != 32'hFFFF_FFFF) failures++;
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
