// event_counter: 32-bit programmable event counter with overflow flag and interrupt.
//
// The counter adds one in each cycle in which any of the four trigger inputs selected
// by its control register is asserted and counting is enabled. On wrap-around from
// all-ones to zero it sets the overflow flag and, when interrupts are enabled, raises
// irq; reading the counter value clears the interrupt. Software may write the counter
// value, and writing the control register with bit 0 set clears the counter.
//
// Control register (document's layout):
//   [0]   software reset (a write with this bit set clears the counter and the flag)
//   [1]   counter enable
//   [2]   interrupt enable
//   [7:4] trigger select, one bit per trigger
//   [9:8] privilege level needed to access the counter
// Register access (this design's choice): addr 0 control, 1 value, 2 overflow flag.
// An access whose priv is below the counter's privilege level is ignored and reads 0.
// Reads are combinational; writes and counting take effect at the clock edge, a write
// of the value taking precedence over counting in the same cycle.
module event_counter #(
  parameter int CW = 32,
  parameter int NT = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NT-1:0] trig,
  // register port
  input  logic          wr_en,
  input  logic          rd_en,
  input  logic [1:0]    addr,
  input  logic [31:0]   wdata,
  input  logic [1:0]    priv,
  output logic [31:0]   rdata,
  output logic          access_ok,
  // status
  output logic [CW-1:0] count,
  output logic          overflow,
  output logic          irq,
  output logic          event_hit
);
  logic [9:0]    ctrl_q;
  logic [CW-1:0] cnt_q;
  logic          ovf_q, irq_q;

  assign access_ok = priv >= ctrl_q[9:8];
  assign event_hit = ctrl_q[1] && |(trig & ctrl_q[7:4]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctrl_q <= '0;
      cnt_q  <= '0;
      ovf_q  <= 1'b0;
      irq_q  <= 1'b0;
    end else begin
      if (event_hit) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == '1) begin
          ovf_q <= 1'b1;
          if (ctrl_q[2]) irq_q <= 1'b1;
        end
      end
      if (rd_en && access_ok && addr == 2'd1)
        irq_q <= 1'b0;
      if (wr_en && access_ok) begin
        case (addr)
          2'd0: begin
            ctrl_q <= wdata[9:0];
            ctrl_q[0] <= 1'b0;
            if (wdata[0]) begin
              cnt_q <= '0;
              ovf_q <= 1'b0;
              irq_q <= 1'b0;
            end
          end
          2'd1: cnt_q <= wdata[CW-1:0];
          2'd2: ovf_q <= wdata[0];
          default: ;
        endcase
      end
    end

  always_comb begin
    rdata = '0;
    if (access_ok)
      case (addr)
        2'd0: rdata = {22'd0, ctrl_q};
        2'd1: rdata = 32'(cnt_q);
        2'd2: rdata = {31'd0, ovf_q};
        default: rdata = '0;
      endcase
  end

  assign count    = cnt_q;
  assign overflow = ovf_q;
  assign irq      = irq_q;
endmodule
