// noc_tb_pkg: helpers shared by the network testbenches.
//
// Builds LBDR configurations for a DIM_X x DIM_Y mesh (XY and YX dimension-order
// routing, mesh connectivity), and packs/unpacks the test packet format: the header
// carries destination, priority, message type and {source, sequence number}; every
// other flit carries a checksum of source, sequence number and flit index.
package noc_tb_pkg;
  import noc_pkg::*;

  // XY: X first, then Y: only X-to-Y turns (Ren, Res, Rwn, Rws) are allowed.
  // YX: Y first, then X: only Y-to-X turns (Rne, Rnw, Rse, Rsw).
  function automatic lbdr_cfg_t mesh_cfg(int x, int y, int dx, int dy, bit yx);
    lbdr_cfg_t c;
    c = '0;
    c.r_local = yx ? rbits_t'({1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1})
                   : rbits_t'({1'b0, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0});
    c.r_global = c.r_local;
    c.c_local[P_N] = y > 0;
    c.c_local[P_S] = y < dy-1;
    c.c_local[P_W] = x > 0;
    c.c_local[P_E] = x < dx-1;
    c.c_global = c.c_local;
    return c;
  endfunction

  function automatic logic [FLIT_W-1:0] hdr_data(int dst_x, int dst_y, int prio, bit glob,
                                                 int src, int seq);
    header_t h;
    h.dst_x      = COORD_W'(dst_x);
    h.dst_y      = COORD_W'(dst_y);
    h.prio       = PRIO_W'(prio);
    h.global_msg = glob;
    h.payload    = {8'(src), 12'(seq)};
    return FLIT_W'(h);
  endfunction

  function automatic logic [FLIT_W-1:0] body_data(int src, int seq, int k);
    return FLIT_W'((src * 32'h9E3779B1) ^ (seq * 32'h85EBCA6B) ^ (k * 32'hC2B2AE35) ^ 32'h5A5A0000);
  endfunction
endpackage
