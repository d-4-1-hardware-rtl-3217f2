// noc_switch: 5x5 wormhole mesh switch with LBDR routing and OSR-Lite reconfiguration.
//
// Five input ports (N, E, W, S, local), each a 2-flit buffer with two LBDR units and an
// epoch flip-flop, and five output ports, each with a priority-class round-robin
// arbiter, a crossbar multiplexer and a 6-flit output buffer. Links use stall/go flow
// control: a valid flit moves forward, a stall wire comes back.
//
// Routing configuration: two banks of LBDR bits. cfg_we writes a new configuration
// into the bank not in use and raises the pending flag (LBDR1 flag); this starts the
// switch's part of an OSR-Lite reconfiguration. Its local input port moves to the new
// epoch at once, the other input ports when the token from upstream has arrived and
// their old headers have left, and each output port when all inputs that reach it
// under the old routing have moved. When every port is in the new epoch, the new bank
// becomes the bank in use and the flag clears. The token of an output port is high
// while the port has moved and the switch has not yet completed; it goes to the
// neighbour on tok_out and arrives on up_tok. Reconfigurations must not overlap: a new
// configuration is written only after the previous one has completed everywhere.
//
// Which input ports can reach an output under the old routing follows from the routing
// bits of the neighbours (a turn at this switch is allowed by the Rxy bit of the switch
// the packet comes from), so the neighbours' bits in use come in on nb_rbits; the
// switch snapshots the resulting dependency mask while no reconfiguration is pending.
// This use of neighbour bits is this design's reading of the document's statement that
// port dependencies are extracted from the old routing function.
//
// Latency: 1 cycle in the switch plus 1 on the link per hop for flits and for tokens.
module noc_switch
  import noc_pkg::*;
#(
  parameter int IN_DEPTH  = 2,
  parameter int OUT_DEPTH = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [COORD_W-1:0]          cur_x,
  input  logic [COORD_W-1:0]          cur_y,
  // configuration from the control network
  input  logic                        cfg_we,
  input  lbdr_cfg_t                   cfg_new,
  // input links
  input  logic      [NPORTS-1:0]      in_valid,
  input  flit_t     [NPORTS-1:0]      in_flit,
  output logic      [NPORTS-1:0]      stall_up,
  input  logic      [NPORTS-1:0]      up_tok,
  // output links
  output logic      [NPORTS-1:0]      out_valid,
  output flit_t     [NPORTS-1:0]      out_flit,
  input  logic      [NPORTS-1:0]      stall_down,
  output logic      [NPORTS-1:0]      tok_out,
  // routing bits in use, to and from the neighbours (index N, E, W, S)
  output rbits_t                      rbits_cur,
  input  rbits_t    [3:0]             nb_rbits,
  // status
  output logic                        sw_epoch,
  output logic                        reconf_pending,
  output logic      [NPORTS-1:0]      out_busy
);
  lbdr_cfg_t [1:0] cfg_q;
  logic            sw_epoch_q, flag_q;

  logic     [NPORTS-1:0]              hd_valid, in_epoch, out_epoch, pop;
  flit_t    [NPORTS-1:0]              hd_flit;
  portvec_t [NPORTS-1:0]              hd_route;
  logic     [NPORTS-1:0][PRIO_W-1:0]  hd_prio;
  logic     [NPORTS-1:0][NPORTS-1:0]  pop_o;      // [output][input]
  logic     [NPORTS-1:0][NPORTS-1:0]  req_o;      // [output][input]
  logic     [NPORTS-1:0][NPORTS-1:0]  dep_c, dep_q;
  logic     [NPORTS-1:0][PRIO_W-1:0]  level;
  logic     [NPORTS-1:0]              ocbit;
  logic                               all_moved;
  lbdr_cfg_t                          tgt;

  // ---------------- configuration banks and commit ----------------
  always_comb begin
    all_moved = flag_q;
    for (int p = 0; p < NPORTS; p++)
      if (in_epoch[p] == sw_epoch_q || out_epoch[p] == sw_epoch_q) all_moved = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sw_epoch_q <= 1'b0;
      flag_q     <= 1'b0;
      cfg_q      <= '0;          // no links, no turns until configured
    end else if (cfg_we) begin
      cfg_q[~sw_epoch_q] <= cfg_new;
      flag_q <= 1'b1;
    end else if (all_moved) begin
      flag_q     <= 1'b0;
      sw_epoch_q <= ~sw_epoch_q;
    end


  assign sw_epoch       = sw_epoch_q;
  assign reconf_pending = flag_q;
  assign tgt            = cfg_q[flag_q ? ~sw_epoch_q : sw_epoch_q];
  assign rbits_cur      = cfg_q[sw_epoch_q].r_local | cfg_q[sw_epoch_q].r_global;

  // ---------------- old-routing port dependencies ----------------
  always_comb begin
    rbits_t rn, re, rw, rs;
    rn = nb_rbits[P_N];
    re = nb_rbits[P_E];
    rw = nb_rbits[P_W];
    rs = nb_rbits[P_S];
    dep_c = '0;
    // every input can eject; the local input can use every output
    for (int p = 0; p < NPORTS; p++) begin
      dep_c[P_L][p] = 1'b1;
      dep_c[p][P_L] = 1'b1;
    end
    // straight through
    dep_c[P_N][P_S] = 1'b1;
    dep_c[P_S][P_N] = 1'b1;
    dep_c[P_E][P_W] = 1'b1;
    dep_c[P_W][P_E] = 1'b1;
    // turns, allowed by the bits of the switch the packet comes from
    dep_c[P_E][P_S] = rs.ne;   // going north, turn east
    dep_c[P_W][P_S] = rs.nw;
    dep_c[P_E][P_N] = rn.se;   // going south, turn east
    dep_c[P_W][P_N] = rn.sw;
    dep_c[P_N][P_W] = rw.en;   // going east, turn north
    dep_c[P_S][P_W] = rw.es;
    dep_c[P_N][P_E] = re.wn;   // going west, turn north
    dep_c[P_S][P_E] = re.ws;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dep_q <= '1;
    else if (!flag_q) dep_q <= dep_c;

  // ---------------- ports ----------------
  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    osr_input_port #(
      .DEPTH      (IN_DEPTH),
      .PORT       (p),
      .LOCAL_PORT (p == P_L)
    ) u_in (
      .clk        (clk),
      .rst_n      (rst_n),
      .cur_x      (cur_x),
      .cur_y      (cur_y),
      .cfg        (cfg_q),
      .sw_epoch   (sw_epoch_q),
      .lbdr1_flag (flag_q),
      .in_valid   (in_valid[p]),
      .in_flit    (in_flit[p]),
      .stall_up   (stall_up[p]),
      .up_tok     (up_tok[p]),
      .hd_valid   (hd_valid[p]),
      .hd_flit    (hd_flit[p]),
      .hd_route   (hd_route[p]),
      .hd_prio    (hd_prio[p]),
      .in_epoch   (in_epoch[p]),
      .pop        (pop[p])
    );
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req_o[o][i] = hd_route[i][o];
        pop[i]      = pop[i] | pop_o[o][i];
      end
      ocbit[o] = (o == P_L) ? 1'b1 : tgt.c_local[o];
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    osr_output_port #(.DEPTH(OUT_DEPTH)) u_out (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (hd_valid),
      .in_flit    (hd_flit),
      .in_req     (req_o[o]),
      .in_prio    (hd_prio),
      .in_epoch   (in_epoch),
      .dep        (dep_q[o]),
      .pop        (pop_o[o]),
      .out_valid  (out_valid[o]),
      .out_flit   (out_flit[o]),
      .stall_down (stall_down[o]),
      .cbit       (ocbit[o]),
      .sw_epoch   (sw_epoch_q),
      .out_epoch  (out_epoch[o]),
      .tok_out    (tok_out[o]),
      .busy       (out_busy[o]),
      .cur_level  (level[o])
    );
  end

  // an input is served by one output at a time
  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({pop_o[0][0], pop_o[1][0], pop_o[2][0], pop_o[3][0], pop_o[4][0]}));
endmodule
