// prio_rr_arbiter: priority-class round-robin arbiter.
//
// Arbitration takes two steps. First the requests are filtered by priority: only
// requesters at the highest level present take part. Then a round-robin pointer kept
// for that level picks the winner, starting after the requester that level served last.
// The round-robin state is replicated per priority level, so each level keeps its own
// circular order no matter how traffic of other levels interleaves with it. A register
// holds the level of the latest grant.
//
// Interface: req/prio are sampled combinationally and gnt is one-hot and
// combinational. The state of the winning level advances at the clock edge when
// 'advance' is high (the grant was used). Level 0 is the lowest, NPRIO-1 the highest.
// The two-step scheme, the per-level state and the 3-bit level follow the document;
// the pointer encoding (index of the last winner) is this design's choice.
module prio_rr_arbiter #(
  parameter int N      = 5,
  parameter int PRIO_W = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0]              req,
  input  logic [N-1:0][PRIO_W-1:0]  prio,
  input  logic                      advance,
  output logic [N-1:0]              gnt,
  output logic [PRIO_W-1:0]         gnt_prio,
  output logic [PRIO_W-1:0]         cur_level
);
  localparam int NPRIO = 1 << PRIO_W;
  localparam int IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [NPRIO-1:0][IDX_W-1:0] last_q;   // last winner per level
  logic [PRIO_W-1:0]           top;
  logic                        any;
  logic [N-1:0]                cand;
  logic [IDX_W-1:0]            win;

  // step 1: priority filter
  always_comb begin
    top = '0;
    any = 1'b0;
    for (int i = 0; i < N; i++)
      if (req[i] && (!any || prio[i] > top)) begin
        top = prio[i];
        any = 1'b1;
      end
    for (int i = 0; i < N; i++)
      cand[i] = req[i] && prio[i] == top;
  end

  // step 2: round robin within the level, starting after the last winner
  always_comb begin
    logic found;
    int   k;
    found = 1'b0;
    win   = '0;
    for (int o = 1; o <= N; o++) begin
      k = (int'(last_q[top]) + o) % N;
      if (!found && cand[k]) begin
        found = 1'b1;
        win   = IDX_W'(k);
      end
    end
    gnt      = any ? (N'(1) << win) : '0;
    gnt_prio = top;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      last_q    <= '{default: IDX_W'(N-1)};
      cur_level <= '0;
    end else if (advance && any) begin
      last_q[top] <= win;
      cur_level   <= top;
    end

  // the winner is always one of the requesters
  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    any |-> ($onehot(gnt) && (gnt & req) == gnt));
endmodule
