// vc_multiswitch: a virtual-channel switch built by switch replication.
//
// NVC copies of the VC-less OSR-Lite switch (noc_switch), one per virtual channel,
// sit behind five shared physical links. VC0 carries intra-partition traffic and is the
// channel that is reconfigured at run time; the others carry L2 requests and responses.
// Each copy has its own buffers, routing banks and epochs; only the links are shared.
//
// Link format: valid, a VC identifier and the flit go forward; one stall wire per VC
// comes back, so a blocked VC never holds up another. Tokens (OSR-Lite) and routing
// bits for the neighbours also run per VC.
//
// Output link arbitration, each cycle, among the VCs whose switch copy has a flit for
// that link and whose downstream VC is not stalled: the highest packet priority wins;
// at equal priority the higher VC index wins, so L2 traffic goes before intra-partition
// traffic. The priority of a VC's current packet is read from its header and held until
// its tail. Flits of different VCs may interleave on a link; within a VC, packets stay
// whole. Latency is that of noc_switch: the link mux is combinational after the output
// buffers.
//
// The replication, the shared links, the three VCs and the arbitration policy between
// VCs follow the document. The per-VC stall wires, the VC identifier field, the order
// between VC1 and VC2 at equal priority and per-VC configuration ports are this
// design's own choices.
module vc_multiswitch
  import noc_pkg::*;
#(
  parameter int NVC       = 3,
  parameter int IN_DEPTH  = 2,
  parameter int OUT_DEPTH = 6,
  localparam int VCW      = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [COORD_W-1:0]                 cur_x,
  input  logic [COORD_W-1:0]                 cur_y,
  // configuration, one write port per VC copy
  input  logic      [NVC-1:0]                cfg_we,
  input  lbdr_cfg_t [NVC-1:0]                cfg_new,
  // input links
  input  logic      [NPORTS-1:0]             in_valid,
  input  logic      [NPORTS-1:0][VCW-1:0]    in_vc,
  input  flit_t     [NPORTS-1:0]             in_flit,
  output logic      [NPORTS-1:0][NVC-1:0]    stall_up,
  input  logic      [NPORTS-1:0][NVC-1:0]    up_tok,
  // output links
  output logic      [NPORTS-1:0]             out_valid,
  output logic      [NPORTS-1:0][VCW-1:0]    out_vc,
  output flit_t     [NPORTS-1:0]             out_flit,
  input  logic      [NPORTS-1:0][NVC-1:0]    stall_down,
  output logic      [NPORTS-1:0][NVC-1:0]    tok_out,
  // routing bits to and from the neighbours, per VC
  output rbits_t    [NVC-1:0]                rbits_cur,
  input  rbits_t    [NVC-1:0][3:0]           nb_rbits,
  // status
  output logic      [NVC-1:0]                sw_epoch,
  output logic      [NVC-1:0]                reconf_pending,
  output logic      [NVC-1:0][NPORTS-1:0]    out_busy
);
  logic  [NVC-1:0][NPORTS-1:0] s_in_valid, s_stall_up, s_up_tok;
  logic  [NVC-1:0][NPORTS-1:0] s_out_valid, s_stall_down, s_tok_out;
  flit_t [NVC-1:0][NPORTS-1:0] s_out_flit;
  logic  [NVC-1:0][NPORTS-1:0][PRIO_W-1:0] prio_q, prio_c;
  logic  [NPORTS-1:0][NVC-1:0] ready, gnt;

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    always_comb
      for (int p = 0; p < NPORTS; p++) begin
        s_in_valid[v][p]   = in_valid[p] && in_vc[p] == VCW'(v);
        stall_up[p][v]     = s_stall_up[v][p];
        s_up_tok[v][p]     = up_tok[p][v];
        tok_out[p][v]      = s_tok_out[v][p];
        s_stall_down[v][p] = !gnt[p][v];
      end

    noc_switch #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_sw (
      .clk            (clk),
      .rst_n          (rst_n),
      .cur_x          (cur_x),
      .cur_y          (cur_y),
      .cfg_we         (cfg_we[v]),
      .cfg_new        (cfg_new[v]),
      .in_valid       (s_in_valid[v]),
      .in_flit        (in_flit),
      .stall_up       (s_stall_up[v]),
      .up_tok         (s_up_tok[v]),
      .out_valid      (s_out_valid[v]),
      .out_flit       (s_out_flit[v]),
      .stall_down     (s_stall_down[v]),
      .tok_out        (s_tok_out[v]),
      .rbits_cur      (rbits_cur[v]),
      .nb_rbits       (nb_rbits[v]),
      .sw_epoch       (sw_epoch[v]),
      .reconf_pending (reconf_pending[v]),
      .out_busy       (out_busy[v])
    );
  end

  // priority of each VC's current packet on each output
  always_comb
    for (int v = 0; v < NVC; v++)
      for (int p = 0; p < NPORTS; p++) begin
        header_t h;
        h = header_t'(s_out_flit[v][p].data);
        prio_c[v][p] = s_out_flit[v][p].head ? h.prio : prio_q[v][p];
      end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) prio_q <= '0;
    else
      for (int v = 0; v < NVC; v++)
        for (int p = 0; p < NPORTS; p++)
          if (gnt[p][v]) prio_q[v][p] <= prio_c[v][p];

  // link arbitration: highest priority, then highest VC index
  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      logic [PRIO_W-1:0] best;
      logic              found;
      best  = '0;
      found = 1'b0;
      gnt[p] = '0;
      for (int v = 0; v < NVC; v++)
        ready[p][v] = s_out_valid[v][p] && !stall_down[p][v];
      for (int v = 0; v < NVC; v++)
        if (ready[p][v] && (!found || prio_c[v][p] >= best)) begin
          best   = prio_c[v][p];
          found  = 1'b1;
          gnt[p] = '0;
          gnt[p][v] = 1'b1;
        end
      out_valid[p] = found;
      out_vc[p]    = '0;
      out_flit[p]  = '0;
      for (int v = 0; v < NVC; v++)
        if (gnt[p][v]) begin
          out_vc[p]   = VCW'(v);
          out_flit[p] = s_out_flit[v][p];
        end
    end

  a_one_vc: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(gnt[0]) && $onehot0(gnt[1]) && $onehot0(gnt[2]) && $onehot0(gnt[3]) && $onehot0(gnt[4]));
endmodule
