// osr_output_port: switch output port with OSR-Lite epoch logic.
//
// One per output of the switch: a priority-class round-robin arbiter, the crossbar
// multiplexer for this output and a 6-flit output FIFO that drives the link. Switching
// is wormhole: a granted header locks the port to its input until the tail flit.
//
// OSR-Lite: the port keeps an epoch flip-flop. The arbiter only sees a header when the
// epoch of its input port equals the epoch of this output, so packets of the new epoch
// wait until the output has moved to the new epoch and old packets always go first.
// The output moves to the new epoch when every input port that the old routing
// function lets reach this output (dep mask, plus always the local input port) has
// moved, no old packet still holds the port and the output FIFO has drained; the
// port having moved is then the token seen by the downstream switch. Following the
// local-reconfiguration extension the token leaves only over a connected link
// (connectivity bit set): tok_out = moved AND Cbit. The token is high from the moment
// the port moves until its switch completes the reconfiguration.
//
// Timing: a flit granted at edge t is in the FIFO at t+1 and on the link from then
// (1 cycle in the switch, 1 on the link). The epoch flip-flop changes one edge after
// its conditions hold. The arbiter, FIFO depth, epoch comparison and token masking
// follow the document; draining the output FIFO before moving is this design's way to
// keep the link in order with the token.
module osr_output_port
  import noc_pkg::*;
#(
  parameter int DEPTH = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // from the input ports
  input  logic     [NPORTS-1:0]         in_valid,
  input  flit_t    [NPORTS-1:0]         in_flit,
  input  logic     [NPORTS-1:0]         in_req,      // routing option for this output
  input  logic     [NPORTS-1:0][PRIO_W-1:0] in_prio,
  input  logic     [NPORTS-1:0]         in_epoch,
  input  logic     [NPORTS-1:0]         dep,         // old-routing dependencies
  output logic     [NPORTS-1:0]         pop,
  // link
  output logic                          out_valid,
  output flit_t                         out_flit,
  input  logic                          stall_down,
  // reconfiguration
  input  logic                          cbit,        // link connected
  input  logic                          sw_epoch,    // epoch of the switch's bank in use
  output logic                          out_epoch,
  output logic                          tok_out,
  // observation
  output logic                          busy,        // a packet holds the port
  output logic [PRIO_W-1:0]             cur_level
);
  localparam int PW = $clog2(DEPTH);
  localparam int IW = $clog2(NPORTS);

  flit_t [DEPTH-1:0]  mem_q;
  logic  [PW-1:0]     rd_q, wr_q;
  logic  [PW:0]       cnt_q;
  logic               epoch_q;
  logic               locked_q;
  logic  [IW-1:0]     owner_q;

  logic  [NPORTS-1:0] req, gnt;
  logic               space, push, lpop, grant_any, moved_all;
  flit_t              push_flit;
  logic  [IW-1:0]     win;
  logic  [PRIO_W-1:0] gnt_prio;

  assign space = cnt_q < (PW+1)'(DEPTH);
  assign lpop  = out_valid && !stall_down;   // the flit moves on the link

  always_comb
    for (int i = 0; i < NPORTS; i++)
      req[i] = in_valid[i] && in_flit[i].head && in_req[i] &&
               (in_epoch[i] == epoch_q) && !locked_q && space;

  prio_rr_arbiter #(.N(NPORTS), .PRIO_W(PRIO_W)) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (req),
    .prio      (in_prio),
    .advance   (1'b1),
    .gnt       (gnt),
    .gnt_prio  (gnt_prio),
    .cur_level (cur_level)
  );

  always_comb begin
    win = '0;
    for (int i = 0; i < NPORTS; i++)
      if (gnt[i]) win = IW'(i);
    grant_any = |gnt;
    pop       = '0;
    push      = 1'b0;
    push_flit = in_flit[owner_q];
    if (locked_q) begin
      if (in_valid[owner_q] && space) begin
        push         = 1'b1;
        pop[owner_q] = 1'b1;
      end
    end else if (grant_any) begin
      push      = 1'b1;
      push_flit = in_flit[win];
      pop       = gnt;
    end
  end

  // every input the old routing lets reach this output has moved to the new epoch
  always_comb begin
    moved_all = in_epoch[P_L] != epoch_q;
    for (int i = 0; i < NPORTS; i++)
      if (dep[i] && in_epoch[i] == epoch_q) moved_all = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_q       <= '0;
      wr_q       <= '0;
      cnt_q      <= '0;
      epoch_q    <= 1'b0;
      locked_q   <= 1'b0;
      owner_q    <= '0;
    end else begin
      if (push) wr_q <= (wr_q == PW'(DEPTH-1)) ? '0 : wr_q + 1'b1;
      if (lpop) rd_q <= (rd_q == PW'(DEPTH-1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(lpop);
      if (locked_q) begin
        if (push && push_flit.tail) locked_q <= 1'b0;
      end else if (grant_any && !push_flit.tail) begin
        locked_q <= 1'b1;
        owner_q  <= win;
      end
      if (moved_all && !locked_q && cnt_q == '0 && !push)
        epoch_q <= ~epoch_q;
    end

  always_ff @(posedge clk)
    if (push) mem_q[wr_q] <= push_flit;

  assign out_valid = cnt_q != '0;
  assign out_flit  = mem_q[rd_q];
  assign out_epoch = epoch_q;
  assign tok_out   = cbit && (epoch_q != sw_epoch);   // moved, over a connected link
  assign busy      = locked_q;

  // a flit only leaves the FIFO while it holds one, and only enters with space
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> space);
  // an old packet never uses the port after it moved: grants match epochs
  a_epoch_match: assert property (@(posedge clk) disable iff (!rst_n)
    grant_any |-> in_epoch[win] == epoch_q);
endmodule
