// lbdr: logic-based distributed routing for one input port of a 5x5 mesh switch.
//
// The destination of a header flit is compared with the switch's own coordinate
// (CMP stage), giving the quadrant N'/E'/W'/S'. The routing filter then admits a
// direction when the move is straight, or when it needs a turn at the next switch and
// the routing bit Rxy allows it. The connectivity filter drops directions whose link
// does not exist or is cut at a partition edge. Two multiplexers controlled by the
// message-type bit of the header choose between the local (intra-partition) and the
// global routing bits and connectivity bits, so partitions keep their own routing
// and connectivity while global traffic reaches shared resources. A circuit entry
// (destination plus output port) forces the circuit's output for packets to the
// circuit destination; other packets see the circuit link only through the
// connectivity bits, which are cleared for it.
//
// Interface: purely combinational. route is one-hot in the order N, E, W, S, L when a
// direction exists; when the routing bits allow two directions the first one in that
// order is taken. x grows to the east, y grows to the south.
// The CMP, routing filter, connectivity filter and the two multiplexers follow the
// document; the tie-break and the coordinate orientation are this design's choices.
module lbdr
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic               global_msg,
  input  rbits_t             r_local,
  input  rbits_t             r_global,
  input  cbits_t             c_local,
  input  cbits_t             c_global,
  input  circuit_t           circ,
  output portvec_t           route,
  output logic               unroutable
);
  logic   np, ep, wp, sp;
  rbits_t r;
  cbits_t c;
  logic   n, e, w, s, l;
  portvec_t opts;

  always_comb begin
    // CMP
    np = dst_y < cur_y;
    sp = dst_y > cur_y;
    ep = dst_x > cur_x;
    wp = dst_x < cur_x;
    // message-type multiplexers
    r = global_msg ? r_global : r_local;
    c = global_msg ? c_global : c_local;
    // routing filter
    n = (np & ~ep & ~wp) | (np & ep & r.ne) | (np & wp & r.nw);
    e = (ep & ~np & ~sp) | (ep & np & r.en) | (ep & sp & r.es);
    w = (wp & ~np & ~sp) | (wp & np & r.wn) | (wp & sp & r.ws);
    s = (sp & ~ep & ~wp) | (sp & ep & r.se) | (sp & wp & r.sw);
    l = ~np & ~ep & ~wp & ~sp;
    // connectivity filter
    opts = {l, s & c[P_S], w & c[P_W], e & c[P_E], n & c[P_N]};
    // circuit override
    if (circ.en && circ.dst_x == dst_x && circ.dst_y == dst_y && circ.port < 3'(NPORTS))
      opts = portvec_t'(1) << circ.port;
    // one option
    route = opts & (~opts + 1'b1);
    unroutable = (opts == '0);
  end
endmodule
