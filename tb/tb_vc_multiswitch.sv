// tb_vc_multiswitch: one three-VC switch at (1,1) of a 4x4 mesh, links driven by the bench.
//
// Fifteen packet sources, one per input link and VC, share each input link: every
// cycle the bench's link multiplexer picks at random one source whose VC is not
// stalled. Packets carry random priorities 0..3 so that equal and different priorities
// meet. Fifteen checkers, one per output link and VC, verify XY routing, that a packet
// leaves on the VC it came in on, and packet integrity. Each cycle, on every output
// link, the VC sent must be the one with the highest priority among the ready VCs, the
// highest VC index among equals. The run ends by checking that every packet arrived and
// that both kinds of VC conflict occurred. Timing: all checks sample at the rising edge;
// the downstream stalls are random, one cycle in four per VC. The rule between VC0 and
// the L2 channels is the source's; the VC1/VC2 tie order and the link format are this
// design's.
module tb_vc_multiswitch;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  localparam int NVC = 3, LEN = 3, CX = 1, CY = 1, DX = 4, DY = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      [NVC-1:0] cfg_we;
  lbdr_cfg_t [NVC-1:0] cfg_new;
  logic      [NPORTS-1:0] in_valid, out_valid;
  logic      [NPORTS-1:0][1:0] in_vc, out_vc;
  flit_t     [NPORTS-1:0] in_flit, out_flit;
  logic      [NPORTS-1:0][NVC-1:0] stall_up, up_tok, stall_down, tok_out;
  rbits_t    [NVC-1:0] rbits_cur;
  rbits_t    [NVC-1:0][3:0] nb_rbits;
  logic      [NVC-1:0] sw_epoch, pending;
  logic      [NVC-1:0][NPORTS-1:0] out_busy;

  vc_multiswitch dut (.clk(clk), .rst_n(rst_n), .cur_x(COORD_W'(CX)),
    .cur_y(COORD_W'(CY)), .cfg_we(cfg_we), .cfg_new(cfg_new), .in_valid(in_valid),
    .in_vc(in_vc), .in_flit(in_flit), .stall_up(stall_up), .up_tok(up_tok),
    .out_valid(out_valid), .out_vc(out_vc), .out_flit(out_flit), .stall_down(stall_down),
    .tok_out(tok_out), .rbits_cur(rbits_cur), .nb_rbits(nb_rbits), .sw_epoch(sw_epoch),
    .reconf_pending(pending), .out_busy(out_busy));

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic int ref_port(int x, int y);
    if (x > CX) return P_E;
    if (x < CX) return P_W;
    if (y > CY) return P_S;
    if (y < CY) return P_N;
    return P_L;
  endfunction

  // ---------------- sources: one per (input, VC) ----------------
  bit run = 0;
  int sent = 0, rcvd = 0;
  bit busy_s [NPORTS][NVC];
  int k [NPORTS][NVC], seq [NPORTS][NVC], dx [NPORTS][NVC], dy [NPORTS][NVC], pr [NPORTS][NVC];
  int pick [NPORTS];

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      int v;
      v = pick[p];
      in_valid[p]     = v >= 0;
      in_vc[p]        = v >= 0 ? 2'(v) : 2'd0;
      in_flit[p]      = '0;
      if (v >= 0) begin
        in_flit[p].head = k[p][v] == 0;
        in_flit[p].tail = k[p][v] == LEN-1;
        in_flit[p].data = k[p][v] == 0 ? hdr_data(dx[p][v], dy[p][v], pr[p][v], 1'b0, p*4+v, seq[p][v])
                                       : body_data(p*4+v, seq[p][v], k[p][v]);
      end
    end

  // at each edge: the picked flit moves if its VC is not stalled; then pick again
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      int v, c;
      v = pick[p];
      if (v >= 0 && !stall_up[p][v]) begin
        if (k[p][v] == LEN-1) begin busy_s[p][v] = 0; k[p][v] = 0; seq[p][v]++; end
        else k[p][v]++;
      end
      for (int w = 0; w < NVC; w++)
        if (!busy_s[p][w] && run && $urandom_range(0, 3) == 0) begin
          int x, y;
          do begin x = $urandom_range(0, DX-1); y = $urandom_range(0, DY-1); end
          while (ref_port(x, y) == p);
          dx[p][w] = x; dy[p][w] = y; pr[p][w] = $urandom_range(0, 3);
          busy_s[p][w] = 1; sent++;
        end
      // the link carries one VC per cycle: choose among busy VCs that are not stalled
      pick[p] = -1;
      c = $urandom_range(0, NVC-1);
      for (int i = 0; i < NVC; i++) begin
        int w;
        w = (c + i) % NVC;
        if (pick[p] < 0 && busy_s[p][w] && !stall_up[p][w]) pick[p] = w;
      end
    end
  end

  // ---------------- checkers: one per (output, VC) ----------------
  bit in_pkt [NPORTS][NVC];
  int csrc [NPORTS][NVC], cseq [NPORTS][NVC], ck [NPORTS][NVC];
  int conflicts = 0, prio_over_vc = 0;
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      // link arbitration rule
      int best_v, best_p, nready;
      best_v = -1; best_p = -1; nready = 0;
      for (int v = 0; v < NVC; v++)
        if (dut.ready[o][v]) begin
          nready++;
          if (int'(dut.prio_c[v][o]) >= best_p) begin best_p = int'(dut.prio_c[v][o]); best_v = v; end
        end
      if (nready > 1) begin
        conflicts++;
        check(out_valid[o] && int'(out_vc[o]) == best_v, "VC link arbitration");
        if (best_v < NVC-1 && dut.ready[o][NVC-1]) prio_over_vc++;
      end
      if (out_valid[o]) begin
        int v;
        header_t h;
        v = int'(out_vc[o]);
        h = header_t'(out_flit[o].data);
        if (out_flit[o].head) begin
          checks++;
          if (in_pkt[o][v] || ref_port(int'(h.dst_x), int'(h.dst_y)) != o || int'(h.payload[13:12]) != v) begin
            failures++;
            $display("FAIL header on port %0d vc %0d @%0t", o, v, $time);
          end
          in_pkt[o][v] = 1; csrc[o][v] = int'(h.payload[19:12]); cseq[o][v] = int'(h.payload[11:0]); ck[o][v] = 1;
        end else begin
          checks++;
          if (!in_pkt[o][v] || out_flit[o].data != body_data(csrc[o][v], cseq[o][v], ck[o][v])) begin
            failures++;
            $display("FAIL body on port %0d vc %0d @%0t", o, v, $time);
          end
          ck[o][v]++;
          if (out_flit[o].tail) begin in_pkt[o][v] = 0; rcvd++; end
        end
      end
      for (int v = 0; v < NVC; v++) stall_down[o][v] <= $urandom_range(0, 3) == 0;
    end
  end

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      pick[p] = -1;
      for (int v = 0; v < NVC; v++) begin busy_s[p][v] = 0; k[p][v] = 0; seq[p][v] = 0; in_pkt[p][v] = 0; end
    end
    cfg_we = '0; cfg_new = '0; up_tok = '0; stall_down = '0;
    for (int v = 0; v < NVC; v++) begin
      nb_rbits[v][P_N] = mesh_cfg(CX, CY-1, DX, DY, 0).r_local;
      nb_rbits[v][P_S] = mesh_cfg(CX, CY+1, DX, DY, 0).r_local;
      nb_rbits[v][P_E] = mesh_cfg(CX+1, CY, DX, DY, 0).r_local;
      nb_rbits[v][P_W] = mesh_cfg(CX-1, CY, DX, DY, 0).r_local;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_we = '1;
    for (int v = 0; v < NVC; v++) cfg_new[v] = mesh_cfg(CX, CY, DX, DY, 0);
    @(negedge clk); cfg_we = '0;
    @(negedge clk); up_tok = '1;
    repeat (20) @(negedge clk); up_tok = '0;
    check(pending == '0, "configuration committed in every VC copy");
    run = 1;
    repeat (4000) @(posedge clk);
    run = 0;
    repeat (300) @(posedge clk);
    check(out_busy == '0, "no output port still held after the drain");
    check(sent == rcvd, $sformatf("all packets delivered (%0d/%0d)", rcvd, sent));
    check(conflicts > 100, "VC conflicts on the links");
    check(prio_over_vc > 10, "a lower VC won on priority");
    $display("packets %0d, VC conflicts %0d, of which won by priority over a higher VC %0d",
             rcvd, conflicts, prio_over_vc);
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
