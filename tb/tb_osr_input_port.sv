// tb_osr_input_port: directed test of the OSR-Lite input port.
//
// Bank 0 holds XY routing, bank 1 YX routing, for the switch at (1,1). Checks: FIFO
// order and stall when full; routing of the head flit with bank 0; during a
// reconfiguration the west port keeps the old epoch while an old header is stored,
// even with the token present, moves one edge after the header leaves, hides new flits
// until the new bits arrive and then routes them with bank 1; the local port moves on
// the arrival of the new bits; a port whose link is not connected in the new bank moves
// on the new bits without a token.
module tb_osr_input_port;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lbdr_cfg_t [1:0] cfg;
  logic            sw_epoch, flag;
  logic            w_valid, w_stall, w_tok, w_hv, w_ep, w_pop;
  flit_t           w_flit, w_hf;
  portvec_t        w_route;
  logic [2:0]      w_prio;
  logic            l_valid, l_stall, l_hv, l_ep, l_pop;
  flit_t           l_flit, l_hf;
  portvec_t        l_route;
  logic [2:0]      l_prio;

  osr_input_port #(.DEPTH(2), .PORT(P_W), .LOCAL_PORT(1'b0)) u_w (
    .clk(clk), .rst_n(rst_n), .cur_x(4'd1), .cur_y(4'd1), .cfg(cfg), .sw_epoch(sw_epoch),
    .lbdr1_flag(flag), .in_valid(w_valid), .in_flit(w_flit), .stall_up(w_stall), .up_tok(w_tok),
    .hd_valid(w_hv), .hd_flit(w_hf), .hd_route(w_route), .hd_prio(w_prio), .in_epoch(w_ep),
    .pop(w_pop));
  osr_input_port #(.DEPTH(2), .PORT(P_L), .LOCAL_PORT(1'b1)) u_l (
    .clk(clk), .rst_n(rst_n), .cur_x(4'd1), .cur_y(4'd1), .cfg(cfg), .sw_epoch(sw_epoch),
    .lbdr1_flag(flag), .in_valid(l_valid), .in_flit(l_flit), .stall_up(l_stall), .up_tok(1'b0),
    .hd_valid(l_hv), .hd_flit(l_hf), .hd_route(l_route), .hd_prio(l_prio), .in_epoch(l_ep),
    .pop(l_pop));

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic flit_t hflit(int dx, int dy, int p);
    flit_t f;
    f.head = 1; f.tail = 0;
    f.data = hdr_data(dx, dy, p, 0, 0, 0);
    return f;
  endfunction

  // drive during the low phase, the port samples at the rising edge
  task automatic push_w(flit_t f);
    @(negedge clk);
    w_flit = f; w_valid = 1;
    @(negedge clk);
    w_valid = 0;
  endtask

  initial begin
    flit_t b;
    cfg[0] = mesh_cfg(1, 1, 4, 4, 0);
    cfg[1] = mesh_cfg(1, 1, 4, 4, 1);
    sw_epoch = 0; flag = 0; w_valid = 0; w_tok = 0; w_pop = 0; l_valid = 0; l_pop = 0;
    w_flit = '0; l_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // routing and FIFO
    push_w(hflit(3, 3, 5));
    check(w_hv && w_route == (portvec_t'(1) << P_E), "XY route east from bank 0");
    check(w_prio == 3'd5, "priority field");
    b.head = 0; b.tail = 1; b.data = 32'hDEADBEEF;
    push_w(b);
    check(w_stall, "stall when full");
    check(w_hf.head, "head flit first");
    @(negedge clk); w_pop = 1; @(negedge clk); w_pop = 0;
    check(w_hf.data == 32'hDEADBEEF && !w_stall, "second flit next, stall released");
    @(negedge clk); w_pop = 1; @(negedge clk); w_pop = 0;
    check(!w_hv, "empty");

    // reconfiguration: an old header is stored when the token arrives, before new bits
    push_w(hflit(3, 3, 0));
    @(negedge clk); w_tok = 1;
    repeat (3) @(negedge clk);
    check(w_ep == 0, "port keeps old epoch while an old header is stored");
    w_pop = 1; @(negedge clk); w_pop = 0;
    @(negedge clk);
    check(w_ep == 1, "port moves after the old header left (token remembered)");
    check(w_stall, "upstream stalled until new bits arrive");
    check(l_ep == 0, "local port waits for the new bits");
    // a new flit arrives while the port is ahead of the switch
    flag = 1;   // new bits arrive
    @(negedge clk);
    check(l_ep == 1, "local port moves when the new bits arrive");
    push_w(hflit(3, 3, 0));
    check(w_hv && w_route == (portvec_t'(1) << P_S), "new packet routed YX with bank 1");
    @(negedge clk); w_pop = 1; @(negedge clk); w_pop = 0;
    // switch completes
    sw_epoch = 1; flag = 0; w_tok = 0;
    repeat (2) @(negedge clk);
    check(w_ep == 1 && !w_stall, "after completion the port is in the bank-1 epoch");

    // next reconfiguration with the west link not connected in the new bank
    cfg[0] = mesh_cfg(1, 1, 4, 4, 0);
    cfg[0].c_local[P_W] = 1'b0;
    flag = 1;
    repeat (2) @(negedge clk);
    check(w_ep == 0, "unconnected port moves on the new bits without a token");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
