// tb_event_counter: the event counter under random triggers and register accesses,
// compared each cycle with a reference model. Directed parts: counting only while
// enabled and only for selected triggers; wrap from all ones sets the overflow flag
// and, with the interrupt enabled, the interrupt, which a read of the value clears;
// the software reset bit clears the counter; privilege too low blocks reads and writes.
module tb_event_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]  trig;
  logic        wr_en, rd_en, access_ok, overflow, irq, event_hit;
  logic [1:0]  addr, priv;
  logic [31:0] wdata, rdata, count;

  event_counter #(.CW(32), .NT(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // reference model
  logic [9:0] m_ctrl; logic [31:0] m_cnt; logic m_ovf, m_irq;
  int n_ovf = 0, n_irq = 0;
  always @(posedge clk) if (rst_n) begin
    bit ok, hit;
    ok  = priv >= m_ctrl[9:8];
    hit = m_ctrl[1] && |(trig & m_ctrl[7:4]);
    check(ok == access_ok && hit == event_hit && m_cnt == count && m_ovf == overflow &&
          m_irq == irq, "model match");
    if (hit) begin
      if (m_cnt == '1) begin m_ovf = 1; n_ovf++; if (m_ctrl[2]) begin m_irq = 1; n_irq++; end end
      m_cnt = m_cnt + 1;
    end
    if (rd_en && ok && addr == 1) m_irq = 0;
    if (wr_en && ok)
      case (addr)
        0: begin
          m_ctrl = wdata[9:0]; m_ctrl[0] = 0;
          if (wdata[0]) begin m_cnt = 0; m_ovf = 0; m_irq = 0; end
        end
        1: m_cnt = wdata;
        2: m_ovf = wdata[0];
        default: ;
      endcase
  end

  task automatic wr(logic [1:0] a, logic [31:0] d);
    @(negedge clk); wr_en = 1; addr = a; wdata = d;
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    m_ctrl = 0; m_cnt = 0; m_ovf = 0; m_irq = 0;
    trig = 0; wr_en = 0; rd_en = 0; addr = 0; priv = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // enabled, interrupt enabled, triggers 0 and 2, privilege 1
    wr(0, 32'h0000_0156);
    priv = 1;
    wr(1, 32'hFFFF_FFF0);
    @(negedge clk); trig = 4'b0001;
    repeat (20) @(negedge clk);
    trig = 0;
    check(overflow && irq, "wrap sets overflow and interrupt");
    @(negedge clk); rd_en = 1; addr = 1;
    @(negedge clk); rd_en = 0;
    check(!irq && overflow, "reading the value clears the interrupt only");
    priv = 0;
    wr(0, 32'h0000_0001);
    check(overflow, "low privilege cannot reset");
    @(negedge clk); addr = 1; #1;
    check(!access_ok && rdata == 0, "low privilege reads zero");
    priv = 1;
    wr(0, 32'h0000_0157);
    check(count == 0 && !overflow, "software reset clears");
    // random phase
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      trig  = 4'($urandom());
      priv  = 2'($urandom());
      addr  = 2'($urandom());
      rd_en = $urandom_range(0, 9) == 0;
      wr_en = $urandom_range(0, 19) == 0;
      wdata = (addr == 0) ? {22'd0, 2'($urandom()), 4'($urandom()), 1'b1, 1'b1, $urandom_range(0, 1) == 1 && i % 50 == 0}
                          : (addr == 1 ? 32'hFFFF_FF00 | 32'($urandom_range(0, 255)) : $urandom());
    end
    @(negedge clk); wr_en = 0; rd_en = 0;
    check(n_ovf >= 2 && n_irq >= 2, "overflow and interrupt seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
