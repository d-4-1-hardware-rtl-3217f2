// tb_monitor_block: the monitor block programmed through its register interface.
//
// Slice 0 counts trigger 0 when the low data byte equals a pattern (mode A, equal).
// Slice 1 counts trigger 1 raw (mode B). Slice 2 counts trigger 2 when the data differs
// from a pattern and the current ID equals 7 (mode A, not-equal, ID filter). Slice 3
// counts any trigger and is preloaded close to wrap, with the interrupt enabled. Random
// stimulus runs for a few thousand cycles while the bench keeps its own counts; then
// every counter, the overflow flag, the interrupt, the last-event timestamp, the
// switching activity of the data bus and the moving average of the statistics input are
// read back and compared.
module tb_monitor_block;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] vdata, wdata, rdata;
  logic [3:0]  vtrigger, event_hit;
  logic [15:0] cur_id, stat_x;
  logic        stat_valid, wr_en, rd_en, irq;
  logic [7:0]  addr;
  logic [1:0]  priv;

  monitor_block #(.NSLICE(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); wr_en = 1; addr = a; wdata = d;
    @(negedge clk); wr_en = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; #1; d = rdata;
  endtask

  longint n0 = 0, n1 = 0, n2 = 0, n3 = 0, act = 0;
  logic [31:0] prev_v, last0_time;
  bit primed = 0;
  int unsigned win [$];
  logic [31:0] timer = 0;
  always @(posedge clk) if (rst_n) begin
    timer++;
    if (vtrigger[0] && vdata[7:0] == 8'h42) begin n0++; last0_time = timer - 1; end
    if (vtrigger[1]) n1++;
    if (vtrigger[2] && vdata[15:8] != 8'hA5 && cur_id == 16'd7) n2++;
    if (|vtrigger) n3++;
    if (primed) act += $countones(vdata ^ prev_v);
    prev_v = vdata; primed = 1;
    if (stat_valid) begin
      win.push_back(stat_x);
      if (win.size() > 8) void'(win.pop_front());
    end
  end

 task automatic stimulus();
    vdata      = $urandom_range(0, 3) == 0 ? {$urandom() & 32'hFFFF_FF00} | 32'h42 : $urandom();
    if ($urandom_range(0, 3) == 0) vdata[15:8] = 8'hA5;
    vtrigger   = 4'($urandom());
    cur_id     = 16'($urandom_range(5, 8));
    stat_valid = $urandom_range(0, 1);
    stat_x     = 16'($urandom_range(0, 1000));
  endtask

  initial begin
    logic [31:0] d;
    longint s;
    vdata = 0; vtrigger = 0; cur_id = 0; stat_x = 0; stat_valid = 0;
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0; priv = 2'd3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // slice 0: mode A, mask low byte, pattern 0x42, trigger 0
    wr(8'h03, 32'h0000_00FF); wr(8'h04, 32'h0000_0042); wr(8'h05, 32'h0000_0001);
    wr(8'h00, 32'h0000_0013);
    // slice 1: mode B, trigger 1
    wr(8'h15, 32'h0000_0200); wr(8'h10, 32'h0000_0023);
    // slice 2: mode A, not-equal, ID filter 7, trigger 2
    wr(8'h23, 32'h0000_FF00); wr(8'h24, 32'h0000_A500); wr(8'h26, 32'd7);
    wr(8'h25, 32'h0000_0504); wr(8'h20, 32'h0000_0043);
    // slice 3: mode B, all triggers, interrupt enabled, preloaded near wrap
    wr(8'h35, 32'h0000_0200); wr(8'h31, 32'hFFFF_F000); wr(8'h30, 32'h0000_00F6);
    rd(8'h05, d); check(d == 32'h0000_0001, "slice 0 config reads back");
    rd(8'h00, d); check(d == 32'h0000_0012, "reset bit reads back as zero");
    check(!irq, "no interrupt yet");
    wr(8'hF4, 32'h1);           // clear activity and average
    @(negedge clk);
    act = 0; primed = 0; win.delete();
    repeat (6000) begin @(negedge clk); stimulus(); end
    @(negedge clk);
    vtrigger = 0; stat_valid = 0;
    repeat (2) @(negedge clk);
    rd(8'h01, d); check(d == 32'(n0), $sformatf("slice 0 count %0d vs %0d", d, n0));
    rd(8'h11, d); check(d == 32'(n1), $sformatf("slice 1 count %0d vs %0d", d, n1));
    rd(8'h21, d); check(d == 32'(n2), $sformatf("slice 2 count %0d vs %0d", d, n2));
    rd(8'h31, d); check(d == 32'(32'hFFFF_F000 + n3), "slice 3 count wrapped");
    rd(8'h32, d); check(d == 1, "slice 3 overflow");
    check(irq, "interrupt after wrap");
    rd(8'h07, d); check(d == last0_time, "slice 0 timestamp of last event");
    rd(8'hF1, d); check(d == 32'(act), $sformatf("activity %0d vs %0d", d, act));
    s = 0; foreach (win[i]) s += win[i];
    rd(8'hF3, d); check(d == 32'(s), "moving sum");
    rd(8'hF2, d); check(d == 32'(s / 8), "moving average");
    rd(8'hF0, d); check(d > 6000, "timer runs");
    // read of the slice 3 value clears its interrupt
    @(negedge clk); rd_en = 1; addr = 8'h31;
    @(negedge clk); rd_en = 0;
    check(!irq, "interrupt cleared by reading the value");
    // privilege: slice 0 raised to level 2, a level-1 access sees zero and cannot write
    wr(8'h00, 32'h0000_0212);
    priv = 2'd1;
    rd(8'h01, d); check(d == 0, "low privilege reads zero");
    wr(8'h01, 32'd5);
    priv = 2'd2;
    rd(8'h01, d); check(d == 32'(n0), "low privilege write ignored");
    check(n0 > 100 && n1 > 1000 && n2 > 100, "enough events");
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
