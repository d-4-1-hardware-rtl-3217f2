// monitor_block: multi-counter monitor built from slices.
//
// Each slice holds a VM/ASID/PID register, an event filter (mask, pattern, trigger
// mask, ==0 / !=0 choice) and a 32-bit event counter. A slice works in one of two
// modes. Mode A: the filter qualifies the triggers (and, if enabled, the current
// VM/ASID/PID must equal the slice's), and the qualified triggers drive the counter.
// Mode B: the counter works on its own and counts its preselected raw triggers, the
// filter being bypassed. A central free-running timer is the wall clock; each slice
// stores the timer value of its latest counted event, giving the {timestamp, event}
// tuple. The block also holds a switching-activity counter on the monitored bus and a
// moving-average statistic counter fed from stat_x. Control and interface logic is
// shared: one register port with a privilege level reaches every slice, and each
// slice's privilege field protects its counter and its filter registers.
//
// Register map (word addresses, this design's choice):
//   slice s, base 16*s:  +0 counter control  +1 counter value  +2 overflow flag
//                        +3 Vmask  +4 Vpattern
//                        +5 [3:0] VtrigMask, [8] compare !=0, [9] mode B, [10] id enable
//                        +6 VM/ASID/PID  +7 timestamp of the latest event (read only)
//   0xF0 timer   0xF1 switching activity   0xF2 moving average   0xF3 moving sum
//   0xF4 write bit 0: clear switching activity and moving average
// Reads are combinational; writes take effect at the clock edge. irq is the OR of the
// slices' interrupts. Slice count (4) and the ID width (16) are this design's choices;
// the field layout of the control register, the counter width and the moving-average
// window are the document's.
module monitor_block #(
  parameter int NSLICE = 4,
  parameter int W      = 32,
  parameter int NT     = 4,
  parameter int IDW    = 16,
  parameter int SW     = 16,
  parameter int WINDOW = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // monitored signals
  input  logic [W-1:0]   vdata,
  input  logic [NT-1:0]  vtrigger,
  input  logic [IDW-1:0] cur_id,
  input  logic           stat_valid,
  input  logic [SW-1:0]  stat_x,
  // register port
  input  logic           wr_en,
  input  logic           rd_en,
  input  logic [7:0]     addr,
  input  logic [31:0]    wdata,
  input  logic [1:0]     priv,
  output logic [31:0]    rdata,
  // interrupt and status
  output logic           irq,
  output logic [NSLICE-1:0] event_hit
);
  typedef struct packed {
    logic [W-1:0]   vmask;
    logic [W-1:0]   vpattern;
    logic [NT-1:0]  vtrigmask;
    logic           cmp_ne;
    logic           mode_b;
    logic           id_en;
    logic [IDW-1:0] id;
  } slice_cfg_t;

  slice_cfg_t [NSLICE-1:0]       cfg_q;
  logic [NSLICE-1:0][31:0]       ts_q;
  logic [31:0]                   timer_q;
  logic [NSLICE-1:0][31:0]       c_rdata;
  logic [NSLICE-1:0]             c_ok, c_irq, c_wr, c_rd;
  logic [NSLICE-1:0][NT-1:0]     c_trig;
  logic [31:0]                   act_count;
  logic [SW+$clog2(WINDOW)-1:0]  ma_sum;
  logic [SW-1:0]                 ma_avg;
  logic                          glb_clear;
  logic [3:0]                    slice_sel;
  logic [3:0]                    reg_sel;

  assign slice_sel = addr[7:4];
  assign reg_sel   = addr[3:0];
  assign glb_clear = wr_en && addr == 8'hF4 && wdata[0];

  for (genvar s = 0; s < NSLICE; s++) begin : g_slice
    logic [NT-1:0] qual;
    logic          id_ok;

    event_filter #(.W(W), .N(NT)) u_filt (
      .vdata      (vdata),
      .vtrigger   (vtrigger),
      .vmask      (cfg_q[s].vmask),
      .vpattern   (cfg_q[s].vpattern),
      .vtrigmask  (cfg_q[s].vtrigmask),
      .cmp_ne     (cfg_q[s].cmp_ne),
      .data_match (),
      .qualified  (qual)
    );

    assign id_ok     = !cfg_q[s].id_en || cur_id == cfg_q[s].id;
    assign c_trig[s] = cfg_q[s].mode_b ? vtrigger : (id_ok ? qual : '0);
    assign c_wr[s]   = wr_en && slice_sel == 4'(s) && reg_sel < 4'd3;
    assign c_rd[s]   = rd_en && slice_sel == 4'(s) && reg_sel < 4'd3;

    event_counter #(.CW(32), .NT(NT)) u_cnt (
      .clk       (clk),
      .rst_n     (rst_n),
      .trig      (c_trig[s]),
      .wr_en     (c_wr[s]),
      .rd_en     (c_rd[s]),
      .addr      (reg_sel[1:0]),
      .wdata     (wdata),
      .priv      (priv),
      .rdata     (c_rdata[s]),
      .access_ok (c_ok[s]),
      .count     (),
      .overflow  (),
      .irq       (c_irq[s]),
      .event_hit (event_hit[s])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cfg_q   <= '0;
      ts_q    <= '0;
      timer_q <= '0;
    end else begin
      timer_q <= timer_q + 1'b1;
      for (int s = 0; s < NSLICE; s++) begin
        if (event_hit[s]) ts_q[s] <= timer_q;
        if (wr_en && slice_sel == 4'(s) && c_ok[s])
          case (reg_sel)
            4'd3: cfg_q[s].vmask    <= wdata[W-1:0];
            4'd4: cfg_q[s].vpattern <= wdata[W-1:0];
            4'd5: begin
              cfg_q[s].vtrigmask <= wdata[NT-1:0];
              cfg_q[s].cmp_ne    <= wdata[8];
              cfg_q[s].mode_b    <= wdata[9];
              cfg_q[s].id_en     <= wdata[10];
            end
            4'd6: cfg_q[s].id <= wdata[IDW-1:0];
            default: ;
          endcase
      end
    end

  switching_activity_counter #(.W(W), .CW(32)) u_act (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (glb_clear),
    .enable (1'b1),
    .bus    (vdata),
    .count  (act_count)
  );

  moving_average #(.W(SW), .WINDOW(WINDOW)) u_ma (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (glb_clear),
    .x_valid (stat_valid),
    .x       (stat_x),
    .sum     (ma_sum),
    .avg     (ma_avg)
  );

  always_comb begin
    rdata = '0;
    if (addr[7:4] == 4'hF) begin
      case (reg_sel)
        4'd0: rdata = timer_q;
        4'd1: rdata = act_count;
        4'd2: rdata = 32'(ma_avg);
        4'd3: rdata = 32'(ma_sum);
        default: rdata = '0;
      endcase
    end else begin
      for (int s = 0; s < NSLICE; s++)
        if (slice_sel == 4'(s) && c_ok[s])
          case (reg_sel)
            4'd0, 4'd1, 4'd2: rdata = c_rdata[s];
            4'd3: rdata = 32'(cfg_q[s].vmask);
            4'd4: rdata = 32'(cfg_q[s].vpattern);
            4'd5: rdata = {21'd0, cfg_q[s].id_en, cfg_q[s].mode_b, cfg_q[s].cmp_ne,
                           4'd0, 4'(cfg_q[s].vtrigmask)};
            4'd6: rdata = 32'(cfg_q[s].id);
            4'd7: rdata = ts_q[s];
            default: rdata = '0;
          endcase
    end
  end

  assign irq = |c_irq;
endmodule
