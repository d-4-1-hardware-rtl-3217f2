// event_filter: programmable monitor event filter.
//
// The monitored data bus Vdata (W bits) is compared with a programmable pattern under a
// programmable mask: the masked difference Vmask & (Vpattern ^ Vdata) is tested for
// == 0 (the selected bits equal the pattern) or != 0 (some selected bit differs),
// chosen by cmp_ne. The N trigger lines Vtrigger are qualified by the trigger mask
// VtrigMask. The qualified result is one bit per trigger: the trigger is asserted,
// enabled by its mask bit, and the data comparison holds.
//
// Combinational. W, N, the three masks and the ==0 / !=0 choice follow the document;
// combining each trigger with the data comparison by AND is this design's reading of
// how the two parts form one qualified result. Defaults: 32-bit data bus (assumed),
// 4 triggers (the counters take any of four triggers).
module event_filter #(
  parameter int W = 32,
  parameter int N = 4
) (
  input  logic [W-1:0] vdata,
  input  logic [N-1:0] vtrigger,
  input  logic [W-1:0] vmask,
  input  logic [W-1:0] vpattern,
  input  logic [N-1:0] vtrigmask,
  input  logic         cmp_ne,
  output logic         data_match,
  output logic [N-1:0] qualified
);
  logic [W-1:0] diff;
  always_comb begin
    diff       = vmask & (vpattern ^ vdata);
    data_match = cmp_ne ? (diff != '0) : (diff == '0);
    qualified  = (vtrigmask & vtrigger) & {N{data_match}};
  end
endmodule
