// tb_noc_switch: one switch at (1,1) of a 4x4 mesh, all five links driven by the bench.
//
// Phase 1: random 3-flit packets on all five inputs with random back-pressure on all
// outputs, XY routing. Each output checker verifies that a packet left on the XY port
// for its destination, that its flits were not interleaved with another packet and that
// the body is intact. Phase 2: with the switch idle, new YX bits are written: the switch
// must hold the reconfiguration pending and keep its output tokens low until the
// upstream tokens arrive, raise each output token once the output has moved, then commit.
// Phase 3: random traffic again, now checked against YX routing.
module tb_noc_switch;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  localparam int LEN = 3;
  localparam int CX = 1, CY = 1, DX = 4, DY = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we; lbdr_cfg_t cfg_new;
  logic  [NPORTS-1:0] in_valid, stall_up, up_tok, out_valid, stall_down, tok_out, out_busy;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  rbits_t rbits_cur; rbits_t [3:0] nb_rbits;
  logic sw_epoch, pending;

  noc_switch dut (.clk(clk), .rst_n(rst_n), .cur_x(COORD_W'(CX)), .cur_y(COORD_W'(CY)),
    .cfg_we(cfg_we), .cfg_new(cfg_new), .in_valid(in_valid), .in_flit(in_flit),
    .stall_up(stall_up), .up_tok(up_tok), .out_valid(out_valid), .out_flit(out_flit),
    .stall_down(stall_down), .tok_out(tok_out), .rbits_cur(rbits_cur), .nb_rbits(nb_rbits),
    .sw_epoch(sw_epoch), .reconf_pending(pending), .out_busy(out_busy));

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  bit yx = 0;
  function automatic int ref_port(int x, int y, bit use_yx);
    if (!use_yx) begin
      if (x > CX) return P_E;
      if (x < CX) return P_W;
      if (y > CY) return P_S;
      if (y < CY) return P_N;
    end else begin
      if (y > CY) return P_S;
      if (y < CY) return P_N;
      if (x > CX) return P_E;
      if (x < CX) return P_W;
    end
    return P_L;
  endfunction

  // ---------------- sources ----------------
  bit run = 0;
  int seq [NPORTS], k [NPORTS], dst_x [NPORTS], dst_y [NPORTS], pr [NPORTS];
  bit busy_s [NPORTS];
  int sent = 0, rcvd = 0;
  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i]      = busy_s[i];
      in_flit[i].head  = k[i] == 0;
      in_flit[i].tail  = k[i] == LEN-1;
      in_flit[i].data  = k[i] == 0 ? hdr_data(dst_x[i], dst_y[i], pr[i], 1'b0, i, seq[i])
                                   : body_data(i, seq[i], k[i]);
    end
  always @(posedge clk)
    if (rst_n) for (int i = 0; i < NPORTS; i++) begin
      if (busy_s[i] && !stall_up[i]) begin
        if (k[i] == LEN-1) begin busy_s[i] <= 0; k[i] <= 0; seq[i] <= seq[i] + 1; end
        else k[i] <= k[i] + 1;
      end else if (!busy_s[i] && run && $urandom_range(0, 2) == 0) begin
        int x, y;
        // no U-turns: a packet never leaves through the port it came in on
        do begin x = $urandom_range(0, DX-1); y = $urandom_range(0, DY-1); end
        while (ref_port(x, y, yx) == i);
        dst_x[i] <= x; dst_y[i] <= y; pr[i] <= $urandom_range(0, 7);
        busy_s[i] <= 1; sent++;
      end
    end

  // ---------------- output checkers ----------------
  bit in_pkt [NPORTS]; int csrc [NPORTS], cseq [NPORTS], ck [NPORTS];
  bit seen_tok [NPORTS];
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      stall_down[o] <= $urandom_range(0, 3) == 0;
      if (tok_out[o]) seen_tok[o] = 1;
      if (out_valid[o] && !stall_down[o]) begin
        header_t h;
        h = header_t'(out_flit[o].data);
        if (out_flit[o].head) begin
          checks++;
          if (in_pkt[o] || ref_port(int'(h.dst_x), int'(h.dst_y), yx) != o) begin
            failures++;
            $display("FAIL header to (%0d,%0d) on port %0d @%0t", h.dst_x, h.dst_y, o, $time);
          end
          in_pkt[o] = 1; csrc[o] = int'(h.payload[19:12]); cseq[o] = int'(h.payload[11:0]); ck[o] = 1;
        end else begin
          checks++;
          if (!in_pkt[o] || out_flit[o].data != body_data(csrc[o], cseq[o], ck[o]) ||
              out_flit[o].tail != (ck[o] == LEN-1)) begin
            failures++;
            $display("FAIL body on port %0d @%0t", o, $time);
          end
          ck[o]++;
          if (out_flit[o].tail) begin in_pkt[o] = 0; rcvd++; end
        end
      end
    end
  end

  task automatic drain();
    run = 0;
    repeat (200) @(posedge clk);
    check(sent == rcvd, $sformatf("all packets delivered (%0d/%0d)", rcvd, sent));
  endtask

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      seq[i] = 0; k[i] = 0; busy_s[i] = 0; in_pkt[i] = 0; seen_tok[i] = 0;
    end
    cfg_we = 0; cfg_new = '0; up_tok = '0; stall_down = '0;
    nb_rbits[P_N] = mesh_cfg(CX, CY-1, DX, DY, 0).r_local;
    nb_rbits[P_S] = mesh_cfg(CX, CY+1, DX, DY, 0).r_local;
    nb_rbits[P_E] = mesh_cfg(CX+1, CY, DX, DY, 0).r_local;
    nb_rbits[P_W] = mesh_cfg(CX-1, CY, DX, DY, 0).r_local;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the first configuration: all-zero banks, so this write goes in the normal way
    @(negedge clk); cfg_we = 1; cfg_new = mesh_cfg(CX, CY, DX, DY, 0);
    @(negedge clk); cfg_we = 0;
    @(negedge clk); up_tok = '1;
    repeat (20) @(negedge clk); up_tok = '0;
    check(!pending, "first configuration committed");
    repeat (5) @(negedge clk);
    for (int i = 0; i < NPORTS; i++) seen_tok[i] = 0;

    // phase 1: XY traffic
    run = 1;
    repeat (3000) @(posedge clk);
    drain();

    // phase 2: quiescent reconfiguration to YX
    @(negedge clk); cfg_we = 1; cfg_new = mesh_cfg(CX, CY, DX, DY, 1);
    @(negedge clk); cfg_we = 0;
    repeat (10) @(negedge clk);
    check(pending, "pending until upstream tokens");
    check(tok_out == '0, "no output token before the inputs have moved");
    check(dut.g_in[P_L].u_in.epoch_q != sw_epoch, "local input moved at once");
    up_tok = '1;
    repeat (10) @(negedge clk);
    check(!pending, "committed after tokens");
    check(seen_tok[P_N] && seen_tok[P_E] && seen_tok[P_W] && seen_tok[P_S], "every output token raised");
    up_tok = '0;
    yx = 1;

    // phase 3: YX traffic
    run = 1;
    repeat (3000) @(posedge clk);
    drain();
    check(rcvd > 1000, "enough traffic");
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
