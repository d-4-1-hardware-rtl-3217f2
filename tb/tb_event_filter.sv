// tb_event_filter: random comparison of the event filter against a direct model of
// the equation: a trigger is qualified when its mask bit is set and the masked data
// equals the pattern (or differs from it, with the compare mode set). Random data is
// biased so that both the equal and the not-equal outcomes occur often.
module tb_event_filter;
  localparam int W = 32, N = 4;
  logic [W-1:0] vdata, vmask, vpattern;
  logic [N-1:0] vtrigger, vtrigmask, qualified;
  logic cmp_ne, data_match;

  event_filter #(.W(W), .N(N)) dut (.*);

  int checks = 0, failures = 0, n_match = 0, n_miss = 0;

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [W-1:0] diff;
      logic         m;
      vmask     = $urandom();
      vpattern  = $urandom();
      // half the time the data agrees with the pattern under the mask
      vdata     = (i % 2) ? ((vpattern & vmask) | ($urandom() & ~vmask)) : $urandom();
      if (i % 7 == 0) vmask = '0;
      vtrigger  = N'($urandom());
      vtrigmask = N'($urandom());
      cmp_ne    = $urandom_range(0, 1);
      #1;
      diff = (vdata ^ vpattern) & vmask;
      m    = cmp_ne ? (diff != 0) : (diff == 0);
      if (m) n_match++; else n_miss++;
      checks++;
      if (data_match !== m || qualified !== (vtrigger & vtrigmask & {N{m}})) begin
        failures++;
        $display("FAIL data=%h mask=%h pat=%h ne=%0d", vdata, vmask, vpattern, cmp_ne);
      end
    end
    checks++;
    if (n_match < 500 || n_miss < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
