// tb_vertical_top: end-to-end test of the whole design at its default size: the 4x4
// OSR-Lite mesh and the 4-slice monitor block, as instantiated by vertical_top.
//
// Network part (same packet checks as the mesh test): random 5-flit packets between
// all end nodes with random ejection back-pressure, an idle global reconfiguration timed
// against the hand-derived 4(D-1)+3 cycles for XY as old routing, two global
// reconfigurations under traffic, a local reconfiguration of one partition while the
// other keeps running, a circuit entry, and a global message across a partition cut.
// Every output arbiter of switch 5 is also watched: whenever requests of different
// priorities compete, the grant must go to the highest one.
//
// Monitor part: the monitor watches node 5 of the network. Its data bus is the flit
// ejected at node 5, its four trigger lines are: flit ejected at node 5, flit sent on the
// south link of switch 5, switch 5 reconfiguration pending, header ejected at node 5.
// Slice 0 counts headers from source 0 ejected at node 5 (mode A, data filter on the
// source field); slice 1 counts all ejected flits (mode B); slice 2 counts south-link
// flits (mode A, empty mask); slice 3 counts reconfiguration-pending cycles from a
// preload close to wrap, so it overflows and raises the interrupt. The moving average
// input is the number of busy links in the mesh each cycle. At the end all monitor
// registers are read back and compared with the bench's own counts.
//
// The bench ends with one line per mechanism giving how often it happened.
module tb_vertical_top;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  localparam int DX = 4, DY = 4, NS = DX * DY, LEN = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      [NS-1:0] cfg_we;
  lbdr_cfg_t [NS-1:0] cfg_new;
  logic      [NS-1:0] inj_valid, inj_stall, ej_valid, ej_stall, sw_epoch, pending;
  flit_t     [NS-1:0] inj_flit, ej_flit;
  logic      [NS-1:0][NPORTS-1:0] out_busy, link_valid;

  logic [31:0] mon_vdata, mon_wdata, mon_rdata;
  logic [3:0]  mon_vtrigger, mon_event_hit;
  logic [15:0] mon_stat_x;
  logic        mon_wr_en, mon_rd_en, mon_irq;
  logic [7:0]  mon_addr;

  vertical_top dut (
    .clk (clk), .rst_n (rst_n), .cfg_we (cfg_we), .cfg_new (cfg_new),
    .inj_valid (inj_valid), .inj_flit (inj_flit), .inj_stall (inj_stall),
    .ej_valid (ej_valid), .ej_flit (ej_flit), .ej_stall (ej_stall),
    .sw_epoch (sw_epoch), .reconf_pending (pending), .out_busy (out_busy),
    .link_valid (link_valid),
    .mon_vdata (mon_vdata), .mon_vtrigger (mon_vtrigger), .mon_cur_id (16'd0),
    .mon_stat_valid (1'b1), .mon_stat_x (mon_stat_x), .mon_wr_en (mon_wr_en),
    .mon_rd_en (mon_rd_en), .mon_addr (mon_addr), .mon_wdata (mon_wdata),
    .mon_priv (2'd3), .mon_rdata (mon_rdata), .mon_irq (mon_irq),
    .mon_event_hit (mon_event_hit)
  );

  // ---------------- monitor wiring and reference counts ----------------
  localparam int MON = 5;
  logic ej_take;
  assign ej_take      = ej_valid[MON] && !ej_stall[MON];
  assign mon_vdata    = ej_flit[MON].data;
  assign mon_vtrigger = {ej_take && ej_flit[MON].head, pending[MON], link_valid[MON][P_S], ej_take};
  assign mon_stat_x   = 16'($countones(link_valid));

  longint m_hdr0 = 0, m_flits = 0, m_south = 0, m_pend = 0;
  int unsigned m_win [$];
  always @(posedge clk) if (rst_n) begin
    if (mon_vtrigger[3] && mon_vdata[31:24] == 8'd0) m_hdr0++;
    if (mon_vtrigger[0]) m_flits++;
    if (mon_vtrigger[1]) m_south++;
    if (mon_vtrigger[2]) m_pend++;
    m_win.push_back(mon_stat_x);
    if (m_win.size() > 8) void'(m_win.pop_front());
  end

  task automatic mon_wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); mon_wr_en = 1; mon_addr = a; mon_wdata = d;
    @(negedge clk); mon_wr_en = 0;
  endtask
  task automatic mon_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); mon_addr = a; #1; d = mon_rdata;
  endtask

  // ---------------- priority arbitration at switch 5 ----------------
  int prio_decisions = 0;
  for (genvar o = 0; o < NPORTS; o++) begin : g_watch
    always @(posedge clk) if (rst_n) begin
      logic [NPORTS-1:0] rq, gn;
      int hi, lo;
      rq = dut.u_noc.g_sw[MON].u_sw.g_out[o].u_out.req;
      gn = dut.u_noc.g_sw[MON].u_sw.g_out[o].u_out.gnt;
      hi = -1; lo = 8;
      for (int i = 0; i < NPORTS; i++)
        if (rq[i]) begin
          int p;
          p = int'(dut.u_noc.g_sw[MON].u_sw.g_out[o].u_out.in_prio[i]);
          if (p > hi) hi = p;
          if (p < lo) lo = p;
        end
      if (hi > lo) begin
        prio_decisions++;
        for (int i = 0; i < NPORTS; i++)
          if (gn[i]) check(int'(dut.u_noc.g_sw[MON].u_sw.g_out[o].u_out.in_prio[i]) == hi,
                           "grant went to the highest priority");
      end
    end
  end

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

  function automatic bit in_region(int n);
    return region == 0 || (n % DX) < 2;
  endfunction

  always @(posedge clk) begin
    if (rst_n) for (int n = 0; n < NS; n++) begin
      if (inj_valid[n] && inj_stall[n]) inj_stall_cycles++;
      if (inj_valid[n] && !inj_stall[n]) begin
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
      end else if (!busy_q[n] && traffic_on && in_region(n) && $urandom_range(99) < rate_pct) begin
        int d;
        do d = $urandom_range(NS-1); while (d == n || !in_region(d));
        busy_q[n] = 1;
        k_q[n]    = 0;
        dst_q[n]  = d;
        prio_q[n] = $urandom_range(7);
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
    reconf_cycles += took;
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

  int took, circ_s, circ_e, circ_flits = 0, global_msgs = 0, reconf_cycles = 0;
  logic [31:0] d;
  longint msum;
  bit ok;
  bit left_joined;

  initial begin
    cfg_we = '0;
    cfg_new = '0;
    inj_valid = '0;
    inj_flit = '0;
    ej_stall = '0;
    for (int n = 0; n < NS; n++) begin
      seq_q[n] = 0; k_q[n] = 0; busy_q[n] = 0; rx_act[n] = 0; force_req[n] = 0; glob_q[n] = 0;
      foreach (got[n][s]) got[n][s] = 0;
    end
    mon_wr_en = 0; mon_rd_en = 0; mon_addr = 0; mon_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // monitor programming (before any traffic)
    mon_wr(8'h03, 32'hFF00_0000); mon_wr(8'h04, 32'h0); mon_wr(8'h05, 32'h8);
    mon_wr(8'h00, 32'h0000_0083);                       // slice 0: headers from source 0
    mon_wr(8'h15, 32'h0000_0200); mon_wr(8'h10, 32'h0000_0013);  // slice 1: ejected flits
    mon_wr(8'h23, 32'h0); mon_wr(8'h25, 32'h2); mon_wr(8'h20, 32'h0000_0023); // slice 2
    mon_wr(8'h35, 32'h0000_0200); mon_wr(8'h31, 32'hFFFF_FFD0);
    mon_wr(8'h30, 32'h0000_0046);                       // slice 3: pending cycles, irq on
    mon_wr(8'hF4, 32'h1);
    check(m_hdr0 == 0 && m_flits == 0 && m_pend == 0, "monitor programmed before traffic");

    // 1. XY
    build(0, 0, 0);
    reconfigure('1, took);
    check(sw_epoch == '1, "all switches in epoch 1 after first configuration");

    // 2. idle XY -> YX
    build(1, 0, 0);
    reconfigure('1, took);
    $display("idle reconfiguration XY->YX: %0d cycles", took);
    check(took == 4 * (DX - 1) + 3, $sformatf("idle reconfiguration took %0d, expected %0d", took, 4*(DX-1)+3));

    // 3. traffic with two global reconfigurations
    traffic_on = 1;
    repeat (300) @(posedge clk);
    build(0, 0, 0);
    reconfigure('1, took);
    $display("reconfiguration YX->XY under traffic: %0d cycles", took);
    check(took >= 4 * (DX - 1) + 3 && took < 2000, "loaded reconfiguration time");
    repeat (300) @(posedge clk);
    build(1, 0, 0);
    reconfigure('1, took);
    $display("reconfiguration XY->YX under traffic: %0d cycles", took);
    check(took < 2000, "loaded reconfiguration time");
    repeat (200) @(posedge clk);
    traffic_on = 0;
    wait_drain(5000);
    $display("phase 3: %0d packets delivered", received);

    // 4. cut the mesh into two partitions (global), then reconfigure the right half only
    build(1, 1, 0);
    reconfigure('1, took);
    region = 1;
    traffic_on = 1;
    repeat (100) @(posedge clk);
    build(0, 1, 0);
    left_joined = 0;
    fork
      reconfigure(16'hCCCC, took);
      begin
        repeat (200) begin
          @(posedge clk);
          if ((pending & 16'h3333) != '0) left_joined = 1;
        end
      end
    join
    local_reconf_count++;
    check(!left_joined, "left partition took part in a local reconfiguration");
    check((sw_epoch & 16'hCCCC) == 16'h0000 && (sw_epoch & 16'h3333) == 16'h3333,
          $sformatf("epochs after local reconfiguration %h", sw_epoch));
    $display("local reconfiguration of the right half: %0d cycles", took);
    repeat (100) @(posedge clk);
    traffic_on = 0;
    wait_drain(5000);
    region = 0;

    // 5. circuit at switch 5 (1,1): packets from its local port to (3,1) leave south
    stall_rand = 0;
    build(0, 0, 1);
    reconfigure('1, took);
    circ_s = 0;
    circ_e = 0;
    fork
      send_one(5, 7, 0, ok);
      repeat (60) begin
        @(posedge clk);
        if (link_valid[5][P_S]) circ_s++;
        if (link_valid[5][P_E]) circ_e++;
      end
    join
    check(ok, "circuit packet delivered");
    check(circ_s == LEN && circ_e == 0, $sformatf("circuit path: south %0d east %0d flits", circ_s, circ_e));
    circ_flits += circ_s;
    // a packet from (0,1) to (3,1) crosses switch 5 from the west: no circuit there
    circ_s = 0;
    circ_e = 0;
    fork
      send_one(4, 7, 0, ok);
      repeat (60) begin
        @(posedge clk);
        if (link_valid[5][P_S]) circ_s++;
        if (link_valid[5][P_E]) circ_e++;
      end
    join
    check(ok, "transit packet delivered");
    check(circ_e == LEN && circ_s == 0, "transit packet keeps the XY path");

    // 6. global message across the partition cut
    build(0, 1, 0);
    reconfigure('1, took);
    send_one(0, 3, 1, ok);
    check(ok, "global message crosses the partition edge");
    if (ok) global_msgs++;

    wait_drain(1000);
    check(inj_stall_cycles > 0, "injection backpressure happened");
    check(ej_stall_cycles > 0, "ejection stall happened");
    check(received > 200, "enough traffic");
    check(prio_decisions > 0, "priority arbitration happened");

    // monitor read-back
    repeat (3) @(negedge clk);
    mon_rd(8'h01, d); check(d == 32'(m_hdr0), $sformatf("monitor slice 0: %0d vs %0d", d, m_hdr0));
    mon_rd(8'h11, d); check(d == 32'(m_flits), $sformatf("monitor slice 1: %0d vs %0d", d, m_flits));
    mon_rd(8'h21, d); check(d == 32'(m_south), $sformatf("monitor slice 2: %0d vs %0d", d, m_south));
    mon_rd(8'h31, d); check(d == 32'(32'hFFFF_FFD0 + m_pend), $sformatf("monitor slice 3: %0h", d));
    mon_rd(8'h32, d); check(d == 1 && mon_irq, "monitor overflow and interrupt");
    mon_rd(8'hF1, d); check(d > 0, "switching activity counted");
    msum = 0; foreach (m_win[i]) msum += m_win[i];
    mon_rd(8'hF3, d); check(d == 32'(msum), "moving sum of link load");
    check(m_hdr0 > 0 && m_south > 0, "monitor events happened");

    $display("MECHANISM packets_delivered=%0d", received);
    $display("MECHANISM global_reconfigurations=%0d", reconf_count - local_reconf_count);
    $display("MECHANISM local_reconfigurations=%0d", local_reconf_count);
    $display("MECHANISM reconfiguration_cycles_total=%0d", reconf_cycles);
    $display("MECHANISM circuit_flits=%0d", circ_flits);
    $display("MECHANISM global_messages_across_cut=%0d", global_msgs);
    $display("MECHANISM injection_stall_cycles=%0d", inj_stall_cycles);
    $display("MECHANISM ejection_stall_cycles=%0d", ej_stall_cycles);
    $display("MECHANISM priority_decisions_switch5=%0d", prio_decisions);
    $display("MECHANISM monitor_headers_from_src0=%0d", m_hdr0);
    $display("MECHANISM monitor_ejected_flits=%0d", m_flits);
    $display("MECHANISM monitor_south_link_flits=%0d", m_south);
    $display("MECHANISM monitor_pending_cycles=%0d", m_pend);
    $display("MECHANISM monitor_overflow_interrupts=%0d", int'(mon_irq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
