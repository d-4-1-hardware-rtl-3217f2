// tb_osr_propagation: OSR-Lite reconfiguration time on an 8x8 mesh, without traffic and
// under three injection rates, with 5-flit packets of 32-bit flits.
//
// The idle case is checked against the time worked out by hand for XY as the old
// routing: 2 cycles per hop (input port, then output port), D-1 hops along a row and
// D-1 along a column, one cycle for the first input and one for the final commit gives
// 4(D-1)+3 = 31 cycles for D = 8. Under load, each rate first runs long enough to fill the
// network, then the routing is changed while traffic keeps flowing; the time until the
// last switch has committed is printed and must stay within a bound, and every packet
// injected before, during and after the change must arrive intact at its destination.
// Global and local switching alternate between XY and YX so every run changes the
// routing. The injection rate is the chance, per idle cycle and end node, of starting a
// packet.
module tb_osr_propagation;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  localparam int DX = 8, DY = 8, NS = DX * DY, LEN = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      [NS-1:0] cfg_we;
  lbdr_cfg_t [NS-1:0] cfg_new;
  logic      [NS-1:0] inj_valid, inj_stall, ej_valid, ej_stall, sw_epoch, pending;
  flit_t     [NS-1:0] inj_flit, ej_flit;
  logic      [NS-1:0][NPORTS-1:0] out_busy, link_valid;

  noc_mesh #(.DIM_X(DX), .DIM_Y(DY)) dut (
    .clk (clk), .rst_n (rst_n), .cfg_we (cfg_we), .cfg_new (cfg_new),
    .inj_valid (inj_valid), .inj_flit (inj_flit), .inj_stall (inj_stall),
    .ej_valid (ej_valid), .ej_flit (ej_flit), .ej_stall (ej_stall),
    .sw_epoch (sw_epoch), .reconf_pending (pending), .out_busy (out_busy),
    .link_valid (link_valid)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- traffic generators ----------------
  bit  traffic_on = 0;
  int  rate_pct   = 20;       // chance per idle cycle to start a packet
  int  region     = 0;        // 0 whole mesh, 1 left half only
  bit  stall_rand = 1;
  int  hotspot = -1;        // >= 0: every packet goes to this node
  int  prio_of [NS];
  int  sent = 0, received = 0;
  int  inj_stall_cycles = 0, ej_stall_cycles = 0;
  int  seq_q   [NS];
  int  k_q     [NS];
  bit  busy_q  [NS];
  int  dst_q   [NS];
  int  prio_q  [NS];
  bit  glob_q  [NS];
  bit  force_req [NS];
  int  force_dst [NS];
  bit  force_glob [NS];
  bit  got     [NS][4096];
  int  t_inj   [NS][4096];
  longint lat_sum [NS];
  int  lat_cnt [NS];

  function automatic bit in_region(int n);
    return region == 0 || (n % DX) < 2;
  endfunction

  always @(posedge clk) begin
    if (rst_n) for (int n = 0; n < NS; n++) begin
      if (inj_valid[n] && inj_stall[n]) inj_stall_cycles++;
      if (inj_valid[n] && !inj_stall[n]) begin
        if (k_q[n] == 0) t_inj[n][seq_q[n] % 4096] = cycle;
        // flit accepted at this edge
        if (k_q[n] == LEN-1) begin
          busy_q[n] = 0;
          seq_q[n]++;
          sent++;
        end else k_q[n]++;
      end
      if (!busy_q[n] && force_req[n]) begin
        force_req[n] = 0;
        busy_q[n] = 1;
        k_q[n]    = 0;
        dst_q[n]  = force_dst[n];
        prio_q[n] = 0;
        glob_q[n] = force_glob[n];
      end else if (!busy_q[n] && traffic_on && in_region(n) && n != hotspot && $urandom_range(99) < rate_pct) begin
        int d;
        if (hotspot >= 0) d = hotspot;
        else do d = $urandom_range(NS-1); while (d == n || !in_region(d));
        busy_q[n] = 1;
        k_q[n]    = 0;
        dst_q[n]  = d;
        prio_q[n] = prio_of[n];
        glob_q[n] = 0;
      end
      if (busy_q[n]) begin
        inj_valid[n]     <= 1'b1;
        inj_flit[n].head <= k_q[n] == 0;
        inj_flit[n].tail <= k_q[n] == LEN-1;
        inj_flit[n].data <= (k_q[n] == 0) ?
          hdr_data(dst_q[n] % DX, dst_q[n] / DX, prio_q[n], glob_q[n], n, seq_q[n]) :
          body_data(n, seq_q[n], k_q[n]);
      end else inj_valid[n] <= 1'b0;
    end
  end

  // ---------------- ejection checkers ----------------
  int  rx_src [NS];
  int  rx_seq [NS];
  int  rx_k   [NS];
  bit  rx_act [NS];

  always @(posedge clk) begin
    if (rst_n) for (int n = 0; n < NS; n++) begin
      if (ej_valid[n] && ej_stall[n]) ej_stall_cycles++;
      if (ej_valid[n] && !ej_stall[n]) begin
        flit_t   f;
        header_t h;
        f = ej_flit[n];
        if (f.head) begin
          h = header_t'(f.data);
          check(!rx_act[n], "header inside a packet");
          check(int'(h.dst_x) == n % DX && int'(h.dst_y) == n / DX, $sformatf("node %0d got packet for (%0d,%0d)", n, h.dst_x, h.dst_y));
          rx_src[n] = int'(h.payload[19:12]);
          rx_seq[n] = int'(h.payload[11:0]);
          check(!got[rx_src[n]][rx_seq[n]], "duplicate packet");
          got[rx_src[n]][rx_seq[n]] = 1;
          rx_k[n]   = 1;
          rx_act[n] = 1;
        end else begin
          check(rx_act[n], "body flit outside a packet");
          check(f.data == body_data(rx_src[n], rx_seq[n], rx_k[n]), $sformatf("corrupt flit at node %0d", n));
          check(f.tail == (rx_k[n] == LEN-1), "tail position");
          rx_k[n]++;
          if (f.tail) begin
            rx_act[n] = 0;
            received++;
            lat_sum[rx_src[n]] += cycle - t_inj[rx_src[n]][rx_seq[n] % 4096];
            lat_cnt[rx_src[n]]++;
          end
        end
      end
      ej_stall[n] <= stall_rand && ($urandom_range(99) < 15);
    end
  end

  // ---------------- configuration helpers ----------------
  lbdr_cfg_t cfg_tab [NS];

  function automatic void build(bit yx, bit cut, bit circuit);
    for (int n = 0; n < NS; n++) begin
      lbdr_cfg_t c;
      c = mesh_cfg(n % DX, n / DX, DX, DY, yx);
      if (cut) begin
        if (n % DX == 1) c.c_local[P_E] = 1'b0;
        if (n % DX == 2) c.c_local[P_W] = 1'b0;
      end
      if (circuit && n == 5) begin
        c.circ[P_L].en    = 1'b1;
        c.circ[P_L].dst_x = 4'd3;
        c.circ[P_L].dst_y = 4'd1;
        c.circ[P_L].port  = 3'(P_S);
      end
      cfg_tab[n] = c;
    end
  endfunction

  int reconf_count = 0, local_reconf_count = 0;

  task automatic reconfigure(logic [NS-1:0] which, output int took);
    int start;
    @(posedge clk);
    for (int n = 0; n < NS; n++) cfg_new[n] <= cfg_tab[n];
    cfg_we <= which;
    @(posedge clk);                // the switches take the write at this edge
    start = cycle;
    cfg_we <= '0;
    @(posedge clk);
    while (pending != '0) @(posedge clk);
    took = cycle - start - 1;      // edges until the last switch committed
    reconf_count++;
  endtask

  task automatic wait_drain(int limit);
    int t = 0;
    while ((sent != received || busy_q.or() || rx_act.or()) && t < limit) begin
      @(posedge clk);
      t++;
    end
    check(sent == received, $sformatf("drain: sent %0d received %0d", sent, received));
  endtask

  task automatic send_one(int src, int dst, bit glob, output bit ok);
    int t = 0, rx_before;
    rx_before = received;
    force_dst[src]  = dst;
    force_glob[src] = glob;
    force_req[src]  = 1;
    while (received == rx_before && t < 500) begin
      @(posedge clk);
      t++;
    end
    ok = received == rx_before + 1;
  endtask

  int took;
  bit yx = 0;
  int rates [3] = '{2, 6, 12};

  initial begin
    cfg_we = '0;
    cfg_new = '0;
    inj_valid = '0;
    inj_flit = '0;
    ej_stall = '0;
    for (int n = 0; n < NS; n++) begin
      seq_q[n] = 0; k_q[n] = 0; busy_q[n] = 0; rx_act[n] = 0; force_req[n] = 0; glob_q[n] = 0;
      prio_of[n] = 0; lat_sum[n] = 0; lat_cnt[n] = 0;
      foreach (got[n][s]) got[n][s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    build(0, 0, 0);
    reconfigure('1, took);
    check(sw_epoch == '1, "first configuration committed everywhere");

    build(1, 0, 0);
    reconfigure('1, took);
    $display("8x8 idle reconfiguration: %0d cycles (expected %0d)", took, 4 * (DX - 1) + 3);
    check(took == 4 * (DX - 1) + 3, "idle propagation time");
    yx = 1;

    foreach (rates[r]) begin
      rate_pct = rates[r];
      traffic_on = 1;
      repeat (600) @(posedge clk);
      yx = !yx;
      build(yx, 0, 0);
      reconfigure('1, took);
      $display("8x8 reconfiguration at injection %0d%%: %0d cycles", rates[r], took);
      check(took >= 4 * (DX - 1) + 3 && took < 1500, "loaded propagation time within bound");
      repeat (300) @(posedge clk);
      traffic_on = 0;
      wait_drain(8000);
    end
    check(received > 1000, "enough traffic");
    $display("packets delivered %0d, injection stall cycles %0d", received, inj_stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
