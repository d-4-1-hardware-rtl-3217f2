// tb_osr_output_port: directed test of the OSR-Lite output port.
//
// Five packet sources feed the port. Checks: a high-priority packet wins over a
// low-priority one; wormhole switching keeps a packet's flits together; the 6-flit
// FIFO stops taking flits while the link is stalled; a header from an input that has
// moved to the new epoch is not served while the output is in the old epoch; the output
// moves only after every dependent input has moved and its FIFO has drained; the token
// (moved AND connectivity bit) then rises, and the new-epoch packet is served.
module tb_osr_output_port;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NPORTS-1:0]             in_valid, in_req, in_epoch, dep, pop;
  flit_t [NPORTS-1:0]             in_flit;
  logic  [NPORTS-1:0][PRIO_W-1:0] in_prio;
  logic  out_valid, stall_down, cbit, out_epoch, tok_out, busy, sw_epoch;
  flit_t out_flit;
  logic [PRIO_W-1:0] level;

  osr_output_port #(.DEPTH(6)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_flit(in_flit), .in_req(in_req), .in_prio(in_prio), .in_epoch(in_epoch), .dep(dep),
    .pop(pop), .out_valid(out_valid), .out_flit(out_flit), .stall_down(stall_down),
    .cbit(cbit), .sw_epoch(sw_epoch), .out_epoch(out_epoch), .tok_out(tok_out), .busy(busy),
    .cur_level(level));

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // sources: packet of 3 flits per input, payload = input*16 + flit index
  int  k   [NPORTS];
  bit  on  [NPORTS];
  int  prio_of [NPORTS];
  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i]      = on[i];
      in_flit[i].head  = k[i] == 0;
      in_flit[i].tail  = k[i] == 2;
      in_flit[i].data  = 32'(i * 16 + k[i]);
      in_prio[i]       = PRIO_W'(prio_of[i]);
      in_req[i]        = 1'b1;
    end
  always @(posedge clk)
    for (int i = 0; i < NPORTS; i++)
      if (pop[i]) begin
        if (k[i] == 2) begin on[i] <= 0; k[i] <= 0; end
        else k[i] <= k[i] + 1;
      end

  int got [$];
  always @(posedge clk) if (out_valid && !stall_down) got.push_back(int'(out_flit.data));

  initial begin
    for (int i = 0; i < NPORTS; i++) begin k[i] = 0; on[i] = 0; prio_of[i] = 0; end
    in_epoch = '0; dep = '1; cbit = 1; sw_epoch = 0; stall_down = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // priority: input 0 low, input 2 high, link stalled so the FIFO fills
    prio_of[0] = 1; prio_of[2] = 6; on[0] = 1; on[2] = 1;
    repeat (12) @(negedge clk);
    check(got.size() == 0, "nothing leaves while stalled");
    check(on[2] == 0 && on[0] == 0 && dut.cnt_q == 6, "FIFO holds both packets while the link is stalled");
    stall_down = 0;
    repeat (12) @(negedge clk);
    check(got.size() == 6, "both packets delivered");
    if (got.size() == 6)
      check(got[0] == 32 && got[1] == 33 && got[2] == 34 && got[3] == 0 && got[4] == 1 && got[5] == 2,
            "high-priority packet first, packets not interleaved");
    // FIFO depth: three 3-flit packets with the link stalled: 6 flits enter, then stop
    stall_down = 1;
    got.delete();
    on[1] = 1; on[3] = 1; on[4] = 1;
    repeat (20) @(negedge clk);
    check(dut.cnt_q == 6, "FIFO full at 6 flits");
    stall_down = 0;
    repeat (20) @(negedge clk);
    check(got.size() == 9, "all flits after the stall");

    // epochs: input 3 has moved and offers a packet, input 1 (dependent) has not
    in_epoch = 5'b11000;        // inputs 3 and 4 (local) moved
    on[3] = 1;
    repeat (6) @(negedge clk);
    check(on[3] == 1 && k[3] == 0, "new-epoch packet waits for the old-epoch output");
    check(out_epoch == 0 && !tok_out, "output still old: input 1..2 have not moved");
    dep = 5'b11001;             // only inputs 0, 3, 4 depend on this output
    in_epoch = 5'b11001;
    @(negedge clk);
    @(negedge clk);
    check(out_epoch == 1, "output moved once dependent inputs moved");
    check(tok_out, "token raised over a connected link");
    repeat (8) @(negedge clk);
    check(on[3] == 0, "new-epoch packet served after the move");
    cbit = 0;
    #1;
    check(!tok_out, "token blocked at an unconnected link");
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
