// vertical_top: the two hardware facilities side by side.
//
// noc_mesh is the partitionable on-chip network of the accelerator array: LBDR
// routing with local and global routing and connectivity bits, circuit entries,
// priority-class round-robin arbitration and OSR-Lite runtime reconfiguration. Its
// local ports (one per switch) and its per-switch configuration ports are brought out.
// monitor_block is the multi-counter monitor with event filters, event counters, a
// free-running timer, a switching-activity counter and a moving-average counter; its
// monitored inputs and its register port are brought out. The document describes the
// monitors as placeable anywhere in the system, so the two are not wired to each other
// here.
module vertical_top
  import noc_pkg::*;
#(
  parameter int DIM_X  = 4,
  parameter int DIM_Y  = 4,
  parameter int NSLICE = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // network configuration (control network side)
  input  logic      [DIM_X*DIM_Y-1:0]   cfg_we,
  input  lbdr_cfg_t [DIM_X*DIM_Y-1:0]   cfg_new,
  // network end nodes
  input  logic      [DIM_X*DIM_Y-1:0]   inj_valid,
  input  flit_t     [DIM_X*DIM_Y-1:0]   inj_flit,
  output logic      [DIM_X*DIM_Y-1:0]   inj_stall,
  output logic      [DIM_X*DIM_Y-1:0]   ej_valid,
  output flit_t     [DIM_X*DIM_Y-1:0]   ej_flit,
  input  logic      [DIM_X*DIM_Y-1:0]   ej_stall,
  output logic      [DIM_X*DIM_Y-1:0]   sw_epoch,
  output logic      [DIM_X*DIM_Y-1:0]   reconf_pending,
  output logic      [DIM_X*DIM_Y-1:0][NPORTS-1:0] out_busy,
  output logic      [DIM_X*DIM_Y-1:0][NPORTS-1:0] link_valid,
  // monitor
  input  logic [31:0]                   mon_vdata,
  input  logic [3:0]                    mon_vtrigger,
  input  logic [15:0]                   mon_cur_id,
  input  logic                          mon_stat_valid,
  input  logic [15:0]                   mon_stat_x,
  input  logic                          mon_wr_en,
  input  logic                          mon_rd_en,
  input  logic [7:0]                    mon_addr,
  input  logic [31:0]                   mon_wdata,
  input  logic [1:0]                    mon_priv,
  output logic [31:0]                   mon_rdata,
  output logic                          mon_irq,
  output logic [NSLICE-1:0]             mon_event_hit
);
  noc_mesh #(.DIM_X(DIM_X), .DIM_Y(DIM_Y)) u_noc (
    .clk            (clk),
    .rst_n          (rst_n),
    .cfg_we         (cfg_we),
    .cfg_new        (cfg_new),
    .inj_valid      (inj_valid),
    .inj_flit       (inj_flit),
    .inj_stall      (inj_stall),
    .ej_valid       (ej_valid),
    .ej_flit        (ej_flit),
    .ej_stall       (ej_stall),
    .sw_epoch       (sw_epoch),
    .reconf_pending (reconf_pending),
    .out_busy       (out_busy),
    .link_valid     (link_valid)
  );

  monitor_block #(.NSLICE(NSLICE)) u_mon (
    .clk        (clk),
    .rst_n      (rst_n),
    .vdata      (mon_vdata),
    .vtrigger   (mon_vtrigger),
    .cur_id     (mon_cur_id),
    .stat_valid (mon_stat_valid),
    .stat_x     (mon_stat_x),
    .wr_en      (mon_wr_en),
    .rd_en      (mon_rd_en),
    .addr       (mon_addr),
    .wdata      (mon_wdata),
    .priv       (mon_priv),
    .rdata      (mon_rdata),
    .irq        (mon_irq),
    .event_hit  (mon_event_hit)
  );
endmodule
