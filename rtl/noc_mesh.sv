// noc_mesh: DIM_X x DIM_Y 2D mesh of OSR-Lite switches.
//
// Each switch connects to its four neighbours with a flit link and a stall wire in
// each direction plus the token (epoch) wire of each output port, and exchanges the
// routing bits it uses with the neighbours so that each switch knows which turns the
// old routing function allows at it. Switch n = y*DIM_X + x sits at column x (growing
// east) and row y (growing south). The local port of every switch is brought out, as
// is each switch's configuration write port (the control network that carries new
// LBDR bits from the central manager is outside this block). Links at the mesh edge
// are tied off: no flits, no stall, no token.
//
// The default 4x4 size is the document's GPPA mesh; every other size up to 16x16
// (4-bit coordinates) works the same way.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int DIM_X     = 4,
  parameter int DIM_Y     = 4,
  parameter int IN_DEPTH  = 2,
  parameter int OUT_DEPTH = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration, per switch
  input  logic      [DIM_X*DIM_Y-1:0]   cfg_we,
  input  lbdr_cfg_t [DIM_X*DIM_Y-1:0]   cfg_new,
  // local ports: injection
  input  logic      [DIM_X*DIM_Y-1:0]   inj_valid,
  input  flit_t     [DIM_X*DIM_Y-1:0]   inj_flit,
  output logic      [DIM_X*DIM_Y-1:0]   inj_stall,
  // local ports: ejection
  output logic      [DIM_X*DIM_Y-1:0]   ej_valid,
  output flit_t     [DIM_X*DIM_Y-1:0]   ej_flit,
  input  logic      [DIM_X*DIM_Y-1:0]   ej_stall,
  // status
  output logic      [DIM_X*DIM_Y-1:0]   sw_epoch,
  output logic      [DIM_X*DIM_Y-1:0]   reconf_pending,
  output logic      [DIM_X*DIM_Y-1:0][NPORTS-1:0] out_busy,
  output logic      [DIM_X*DIM_Y-1:0][NPORTS-1:0] link_valid  // flit leaving each output
);
  localparam int NS = DIM_X * DIM_Y;

  logic   [NS-1:0][NPORTS-1:0] i_valid, i_stall, i_tok, o_valid, o_stall, o_tok;
  flit_t  [NS-1:0][NPORTS-1:0] i_flit, o_flit;
  rbits_t [NS-1:0]             rb;
  rbits_t [NS-1:0][3:0]        nb;

  always_comb begin
    for (int y = 0; y < DIM_Y; y++)
      for (int x = 0; x < DIM_X; x++) begin
        automatic int n = y * DIM_X + x;
        // defaults: edge tie-off
        for (int p = 0; p < 4; p++) begin
          i_valid[n][p] = 1'b0;
          i_flit[n][p]  = '0;
          i_tok[n][p]   = 1'b0;
          o_stall[n][p] = 1'b0;
          nb[n][p]      = '0;
        end
        // north neighbour (x, y-1): its S output feeds my N input
        if (y > 0) begin
          i_valid[n][P_N] = o_valid[n-DIM_X][P_S];
          i_flit[n][P_N]  = o_flit[n-DIM_X][P_S];
          i_tok[n][P_N]   = o_tok[n-DIM_X][P_S];
          o_stall[n][P_N] = i_stall[n-DIM_X][P_S];
          nb[n][P_N]      = rb[n-DIM_X];
        end
        if (y < DIM_Y-1) begin
          i_valid[n][P_S] = o_valid[n+DIM_X][P_N];
          i_flit[n][P_S]  = o_flit[n+DIM_X][P_N];
          i_tok[n][P_S]   = o_tok[n+DIM_X][P_N];
          o_stall[n][P_S] = i_stall[n+DIM_X][P_N];
          nb[n][P_S]      = rb[n+DIM_X];
        end
        if (x > 0) begin
          i_valid[n][P_W] = o_valid[n-1][P_E];
          i_flit[n][P_W]  = o_flit[n-1][P_E];
          i_tok[n][P_W]   = o_tok[n-1][P_E];
          o_stall[n][P_W] = i_stall[n-1][P_E];
          nb[n][P_W]      = rb[n-1];
        end
        if (x < DIM_X-1) begin
          i_valid[n][P_E] = o_valid[n+1][P_W];
          i_flit[n][P_E]  = o_flit[n+1][P_W];
          i_tok[n][P_E]   = o_tok[n+1][P_W];
          o_stall[n][P_E] = i_stall[n+1][P_W];
          nb[n][P_E]      = rb[n+1];
        end
        // local port
        i_valid[n][P_L] = inj_valid[n];
        i_flit[n][P_L]  = inj_flit[n];
        i_tok[n][P_L]   = 1'b0;
        o_stall[n][P_L] = ej_stall[n];
        inj_stall[n]    = i_stall[n][P_L];
        ej_valid[n]     = o_valid[n][P_L];
        ej_flit[n]      = o_flit[n][P_L];
      end
  end

  assign link_valid = o_valid & ~o_stall;

  for (genvar n = 0; n < NS; n++) begin : g_sw
    noc_switch #(
      .IN_DEPTH  (IN_DEPTH),
      .OUT_DEPTH (OUT_DEPTH)
    ) u_sw (
      .clk            (clk),
      .rst_n          (rst_n),
      .cur_x          (COORD_W'(n % DIM_X)),
      .cur_y          (COORD_W'(n / DIM_X)),
      .cfg_we         (cfg_we[n]),
      .cfg_new        (cfg_new[n]),
      .in_valid       (i_valid[n]),
      .in_flit        (i_flit[n]),
      .stall_up       (i_stall[n]),
      .up_tok         (i_tok[n]),
      .out_valid      (o_valid[n]),
      .out_flit       (o_flit[n]),
      .stall_down     (o_stall[n]),
      .tok_out        (o_tok[n]),
      .rbits_cur      (rb[n]),
      .nb_rbits       (nb[n]),
      .sw_epoch       (sw_epoch[n]),
      .reconf_pending (reconf_pending[n]),
      .out_busy       (out_busy[n])
    );
  end
endmodule
