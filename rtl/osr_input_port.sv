// osr_input_port: switch input port with OSR-Lite reconfiguration support.
//
// A 2-flit FIFO receives flits from the upstream link under stall/go flow control
// (stall_up is raised while the buffer is full). The header at the FIFO head is routed
// by two LBDR units, one per bank of the switch's routing configuration; a
// multiplexer driven by the port's epoch flip-flop passes one result to the arbiters. During a reconfiguration the new routing bits are loaded
// into the bank not in use, and the port moves to the new epoch once
//   - the token has arrived: the upstream output port has moved to the new epoch
//     (rising edge of its token wire, remembered until used), or, for the local port,
//     the new configuration has arrived; and
//   - no header of the old epoch is still stored in the buffer.
// Following the local-reconfiguration extension, the upstream token only counts when
// the link is connected (local connectivity bit set); an unconnected port takes the
// arrival of the new configuration as its token instead. If the port has moved to the
// new epoch before the switch received the new bits, the head flit is hidden from
// the arbiters and the upstream is stalled until the bits arrive.
//
// Epoch of stored headers: each buffer entry keeps the epoch it arrived in (new once
// the token has been seen, since the upstream sends new flits only after its token). The document counts old headers with a 2-bit counter;
// a tag per entry gives the same information for a 2-entry buffer and stays right
// when a second reconfiguration follows while new headers are still stored.
//
// Timing: a flit written at edge t is visible at the head at t+1. The epoch flip-flop
// changes one edge after its conditions hold.
module osr_input_port
  import noc_pkg::*;
#(
  parameter int DEPTH      = 2,
  parameter int PORT       = 0,
  parameter bit LOCAL_PORT = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  // routing configuration
  input  lbdr_cfg_t [1:0]    cfg,
  input  logic               sw_epoch,     // epoch of the bank in use
  input  logic               lbdr1_flag,   // new bank loaded, reconfiguration pending
  // upstream link
  input  logic               in_valid,
  input  flit_t              in_flit,
  output logic               stall_up,
  input  logic               up_tok,       // token of the upstream output port
  // towards the arbiters
  output logic               hd_valid,
  output flit_t              hd_flit,
  output portvec_t           hd_route,
  output logic [PRIO_W-1:0]  hd_prio,
  output logic               in_epoch,
  input  logic               pop
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t [DEPTH-1:0] mem_q;
  logic  [DEPTH-1:0] tag_q;
  logic  [DEPTH-1:0] vld_q;
  logic  [PW-1:0]    rd_q, wr_q;
  logic  [PW:0]      cnt_q;
  logic              epoch_q;
  logic              seen_q, up_tok_q;          // token received, token delayed

  logic      full, empty, push, do_pop;
  logic      tbit_new;                       // link connected in the target bank
  logic      token_raw, token_eff, old_hdrs, gate, moved, tag_in, tok_rise;
  portvec_t  route0, route1;
  header_t   hdr;

  assign full  = cnt_q == (PW+1)'(DEPTH);
  assign empty = cnt_q == '0;
  assign push  = in_valid && !stall_up;   // a flit moves when valid and not stalled
  assign do_pop = pop && !empty;

  // connectivity bit of this port's link in the bank being moved to
  always_comb begin
    lbdr_cfg_t tgt;
    tgt = cfg[lbdr1_flag ? ~sw_epoch : sw_epoch];
    tbit_new = LOCAL_PORT ? 1'b1 : tgt.c_local[PORT];
  end

  // token: local port flag mux, then connectivity masking
  assign moved     = epoch_q != sw_epoch;
  assign tok_rise  = up_tok && !up_tok_q && tbit_new;
  assign token_raw = LOCAL_PORT ? lbdr1_flag : (seen_q || tok_rise);
  assign token_eff = (token_raw && tbit_new) || (lbdr1_flag && !tbit_new);
  // epoch of an arriving flit: new once the token has been seen or the port has moved
  assign tag_in    = (moved || seen_q || tok_rise) ? ~sw_epoch : sw_epoch;

  // any stored header of the current (old) epoch
  always_comb begin
    old_hdrs = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (vld_q[i] && mem_q[i].head && tag_q[i] == epoch_q)
          old_hdrs = 1'b1;
  end

  // port ahead of the switch: new epoch but new bits not yet received
  assign gate = (epoch_q != sw_epoch) && !lbdr1_flag;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_q    <= '0;
      wr_q    <= '0;
      cnt_q   <= '0;
      epoch_q <= 1'b0;
      vld_q   <= '0;
      seen_q  <= 1'b0;
      up_tok_q <= 1'b0;
    end else begin
      // the token is the rising edge of the upstream port's "moved" signal; it is
      // kept until this port moves, as it may come before the new routing bits
      up_tok_q <= up_tok;
      if (moved)
        seen_q <= 1'b0;
      else if (tok_rise)
        seen_q <= 1'b1;
      for (int i = 0; i < DEPTH; i++) begin
        if (do_pop && rd_q == PW'(i)) vld_q[i] <= 1'b0;
        if (push && wr_q == PW'(i))   vld_q[i] <= 1'b1;
      end
      if (push) begin
        wr_q <= (wr_q == PW'(DEPTH-1)) ? '0 : wr_q + 1'b1;
      end
      if (do_pop) begin
        rd_q <= (rd_q == PW'(DEPTH-1)) ? '0 : rd_q + 1'b1;
      end
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(do_pop);
      if (epoch_q == sw_epoch && token_eff && (LOCAL_PORT || !old_hdrs))
        epoch_q <= ~epoch_q;
    end

  always_ff @(posedge clk)
    if (push) begin
      mem_q[wr_q] <= in_flit;
      tag_q[wr_q] <= LOCAL_PORT ? epoch_q : tag_in;
    end

  assign stall_up = full || gate;
  assign in_epoch = epoch_q;
  assign hd_flit  = mem_q[rd_q];
  assign hd_valid = !empty && !gate;
  assign hdr      = header_t'(hd_flit.data);
  assign hd_prio  = hdr.prio;
  // routing bits to the arbiters: LBDR0 or LBDR1, chosen by the port epoch
  assign hd_route = epoch_q ? route1 : route0;

  lbdr u_lbdr0 (
    .cur_x      (cur_x),
    .cur_y      (cur_y),
    .dst_x      (hdr.dst_x),
    .dst_y      (hdr.dst_y),
    .global_msg (hdr.global_msg),
    .r_local    (cfg[0].r_local),
    .r_global   (cfg[0].r_global),
    .c_local    (cfg[0].c_local),
    .c_global   (cfg[0].c_global),
    .circ       (cfg[0].circ[PORT]),
    .route      (route0),
    .unroutable ()
  );

  lbdr u_lbdr1 (
    .cur_x      (cur_x),
    .cur_y      (cur_y),
    .dst_x      (hdr.dst_x),
    .dst_y      (hdr.dst_y),
    .global_msg (hdr.global_msg),
    .r_local    (cfg[1].r_local),
    .r_global   (cfg[1].r_global),
    .c_local    (cfg[1].c_local),
    .c_global   (cfg[1].c_global),
    .circ       (cfg[1].circ[PORT]),
    .route      (route1),
    .unroutable ()
  );

endmodule
