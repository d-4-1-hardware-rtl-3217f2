// tb_noc_mesh: self-checking test of the 4x4 mesh with OSR-Lite reconfiguration.
//
// End nodes inject 5-flit packets to random destinations and check every ejected flit
// (right destination, integrity of each flit, contiguous packets, nothing lost or
// duplicated). The test runs:
//   1. configuration with XY routing;
//   2. an idle reconfiguration XY -> YX, timed against the value worked out by hand
//      for XY as the old routing: each hop costs 2 cycles (input then output epoch);
//      the east/west token chains take 2(D-1)+1 cycles, the north/south chains another
//      2(D-1)+1, and the switch commits one cycle after its last port, so the last
//      switch finishes 4(D-1)+3 cycles after the configuration write (15 for 4x4);
//   3. two global reconfigurations (YX -> XY -> YX) while traffic flows, then drain;
//   4. a local reconfiguration of the right half, cut off from the left half by
//      cleared local connectivity bits, while traffic runs inside the left half: left
//      switches must never join the reconfiguration;
//   5. a circuit entry at switch 5 forcing its packets to (3,1) through the south port;
//   6. a global message crossing the partition cut on the global connectivity bits.
module tb_noc_mesh;
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

  noc_mesh dut (
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

  int took, circ_s, circ_e;
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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

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

    wait_drain(1000);
    $display("packets %0d, reconfigurations %0d (local %0d), injection stalls %0d, ejection stalls %0d",
             received, reconf_count, local_reconf_count, inj_stall_cycles, ej_stall_cycles);
    check(inj_stall_cycles > 0, "injection backpressure happened");
    check(ej_stall_cycles > 0, "ejection stall happened");
    check(received > 200, "enough traffic");
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
