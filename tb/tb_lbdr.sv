// tb_lbdr: exhaustive check of the LBDR routing logic on a 4x4 mesh.
//
// For every switch/destination pair it compares the routing option with dimension-order
// routing written directly (XY: correct x first; YX: correct y first), with mesh
// connectivity. It then checks the connectivity filter (a cleared local bit blocks local
// traffic while a global message still passes on the global bits), the global routing
// bits being used for global messages, the circuit override, and each of the eight turn
// bits on its own (a diagonal destination may only take the first hop that bit allows).
module tb_lbdr;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  logic [COORD_W-1:0] cx, cy, dx, dy;
  logic               glob;
  rbits_t             rl, rg;
  cbits_t             cl, cg;
  circuit_t           circ;
  portvec_t           route;
  logic               unr;

  lbdr dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .global_msg(glob),
            .r_local(rl), .r_global(rg), .c_local(cl), .c_global(cg), .circ(circ),
            .route(route), .unroutable(unr));

  int checks = 0, failures = 0;

  function automatic portvec_t dor(int x, int y, int tx, int ty, bit yx);
    if (x == tx && y == ty) return portvec_t'(1) << P_L;
    if (!yx) begin
      if (tx > x) return portvec_t'(1) << P_E;
      if (tx < x) return portvec_t'(1) << P_W;
      if (ty < y) return portvec_t'(1) << P_N;
      return portvec_t'(1) << P_S;
    end
    if (ty < y) return portvec_t'(1) << P_N;
    if (ty > y) return portvec_t'(1) << P_S;
    if (tx > x) return portvec_t'(1) << P_E;
    return portvec_t'(1) << P_W;
  endfunction

  task automatic chk(portvec_t exp, string what);
    #1;
    checks++;
    if (route !== exp) begin
      failures++;
      $display("FAIL %s: cur (%0d,%0d) dst (%0d,%0d) got %b expected %b", what, cx, cy, dx, dy, route, exp);
    end
  endtask

  initial begin
    lbdr_cfg_t c;
    glob = 0;
    circ = '0;
    for (int yx = 0; yx < 2; yx++)
      for (int n = 0; n < 16; n++)
        for (int d = 0; d < 16; d++) begin
          c  = mesh_cfg(n % 4, n / 4, 4, 4, yx[0]);
          rl = c.r_local; rg = c.r_global; cl = c.c_local; cg = c.c_global;
          cx = 4'(n % 4); cy = 4'(n / 4); dx = 4'(d % 4); dy = 4'(d / 4);
          chk(dor(n % 4, n / 4, d % 4, d / 4, yx[0]), yx ? "YX" : "XY");
        end
    // each turn bit on its own: a diagonal destination may only leave on the first hop
    // that bit allows (current switch (1,1), all links connected)
    cl = '1; cg = '1; cx = 4'd1; cy = 4'd1;
    begin
      // {dst_x, dst_y, bit index in rbits_t order ne,nw,en,es,wn,ws,se,sw, expected port}
      int tv [8][4] = '{'{2, 0, 7, P_N}, '{0, 0, 6, P_N}, '{2, 0, 5, P_E}, '{2, 2, 4, P_E},
                        '{0, 0, 3, P_W}, '{0, 2, 2, P_W}, '{2, 2, 1, P_S}, '{0, 2, 0, P_S}};
      foreach (tv[i]) begin
        rl = rbits_t'(8'b1 << tv[i][2]); rg = rl;
        dx = 4'(tv[i][0]); dy = 4'(tv[i][1]);
        chk(portvec_t'(1) << tv[i][3], "single turn bit");
        checks++;
        if (unr) failures++;
      end
      // no turn bit at all: a diagonal destination cannot be routed
      rl = '0; rg = '0; dx = 4'd2; dy = 4'd2;
      #1;
      checks++;
      if (!unr || route != '0) begin failures++; $display("FAIL no turn bits must be unroutable"); end
    end

    // connectivity filter: (1,0) -> (3,0), east link cut for local traffic only
    c  = mesh_cfg(1, 0, 4, 4, 0);
    rl = c.r_local; rg = c.r_global; cl = c.c_local; cg = c.c_global;
    cl[P_E] = 1'b0;
    cx = 1; cy = 0; dx = 3; dy = 0;
    glob = 0;
    chk('0, "local message blocked by cleared connectivity bit");
    checks++;
    if (!unr) begin failures++; $display("FAIL unroutable flag"); end
    glob = 1;
    chk(portvec_t'(1) << P_E, "global message uses global connectivity");

    // global routing bits: local XY, global YX, from (0,0) to (2,2)
    rl = mesh_cfg(0, 0, 4, 4, 0).r_local;
    rg = mesh_cfg(0, 0, 4, 4, 1).r_local;
    cl = mesh_cfg(0, 0, 4, 4, 0).c_local;
    cg = cl;
    cx = 0; cy = 0; dx = 2; dy = 2;
    glob = 0;
    chk(portvec_t'(1) << P_E, "local message follows local bits");
    glob = 1;
    chk(portvec_t'(1) << P_S, "global message follows global bits");

    // circuit: destination (2,2) forced to the west port number encoded in 3 bits
    glob = 0;
    circ.en = 1; circ.dst_x = 2; circ.dst_y = 2; circ.port = 3'(P_S);
    chk(portvec_t'(1) << P_S, "circuit override");
    dx = 3;
    chk(portvec_t'(1) << P_E, "other destination ignores the circuit");
    circ.en = 0; dx = 2;
    chk(portvec_t'(1) << P_E, "disabled circuit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
