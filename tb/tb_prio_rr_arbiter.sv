// tb_prio_rr_arbiter: checks the priority-class round-robin arbiter.
//
// A reference model keeps, per priority level, the index of the requester served last
// and predicts each grant: the highest requested level wins, and within it the first
// requester after the last one served at that level. Random request/priority patterns
// are compared cycle by cycle. Two directed cases follow: three high-priority and three
// low-priority packets (all high ones first), and four equal-priority requesters
// served in circular order.
module tb_prio_rr_arbiter;
  localparam int N = 5, PW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]         req, gnt;
  logic [N-1:0][PW-1:0] prio;
  logic [PW-1:0]        gprio, level;

  prio_rr_arbiter #(.N(N), .PRIO_W(PW)) dut (.clk(clk), .rst_n(rst_n), .req(req), .prio(prio),
    .advance(1'b1), .gnt(gnt), .gnt_prio(gprio), .cur_level(level));

  int checks = 0, failures = 0;
  int last [8];

  function automatic logic [N-1:0] model();
    int top = -1;
    for (int i = 0; i < N; i++) if (req[i] && int'(prio[i]) > top) top = int'(prio[i]);
    if (top < 0) return '0;
    for (int o = 1; o <= N; o++) begin
      int k = (last[top] + o) % N;
      if (req[k] && int'(prio[k]) == top) return N'(1) << k;
    end
    return '0;
  endfunction

  task automatic step(string what);
    logic [N-1:0] exp;
    #1;
    exp = model();
    checks++;
    if (gnt !== exp) begin
      failures++;
      $display("FAIL %s: req %b got %b expected %b", what, req, gnt, exp);
    end
    for (int i = 0; i < N; i++) if (exp[i]) last[prio[i]] = i;
    @(posedge clk);
    #1;
  endtask

  initial begin
    string order;
    for (int l = 0; l < 8; l++) last[l] = N - 1;
    req = '0; prio = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    repeat (2000) begin
      req = N'($urandom);
      for (int i = 0; i < N; i++) prio[i] = PW'($urandom_range(3) == 0 ? 7 : $urandom_range(2));
      step("random");
    end
    // three HIGH and three LOW packets: the output order is all HIGH, then LOW
    order = "";
    begin
      int hi = 3, lo = 3;
      while (hi + lo > 0) begin
        req = {3'b0, lo > 0, hi > 0};
        prio[0] = 3'd7;
        prio[1] = 3'd1;
        #1;
        if (gnt[0]) begin order = {order, "H"}; hi--; end
        else if (gnt[1]) begin order = {order, "L"}; lo--; end
        step("high/low");
      end
    end
    checks++;
    if (order != "HHHLLL") begin failures++; $display("FAIL order %s", order); end
    // equal priority: circular order
    order = "";
    for (int i = 0; i < N; i++) prio[i] = 3'd4;
    repeat (8) begin
      req = 5'b11011;
      #1;
      for (int i = 0; i < N; i++) if (gnt[i]) order = {order, string'(8'(48 + i))};
      step("fair");
    end
    checks++;
    if (order.substr(0, 3) != "0134" && order.substr(0, 3) != "1340" &&
        order.substr(0, 3) != "3401" && order.substr(0, 3) != "4013") begin
      failures++; $display("FAIL circular order %s", order);
    end
    checks++;
    if (order.substr(0, 3) != order.substr(4, 7)) begin failures++; $display("FAIL period %s", order); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
