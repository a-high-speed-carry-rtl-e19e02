// Self-checking test of ling_hi4 over all 256 combinations of the four
// generates and four shifted transmits. The reference ripples real carries
// through the group (c = g | t & c) and takes H = g[3] | c[2], the
// definition of Ling's pseudo-carry, and I as the product of the transmits.
module tb_ling_hi4;
  import ling_pkg::*;

  dr_t [3:0] g, tm;
  dr_t       h, i;
  int checks = 0;
  int failures = 0;

  ling_hi4 dut (.g(g), .tm(tm), .h(h), .i(i));

  initial begin
    for (int n = 0; n < 256; n++) begin
      logic [3:0] gv, tv;
      logic       c, hexp, iexp;
      {gv, tv} = 8'(n);
      for (int k = 0; k < 4; k++) begin
        g[k]  = '{t: gv[k], f: ~gv[k]};
        tm[k] = '{t: tv[k], f: ~tv[k]};
      end
      // tv[k] is the transmit of bit k-1, so bit k's own transmit is tv[k+1].
      c = gv[0];
      c = gv[1] | (tv[2] & c);
      c = gv[2] | (tv[3] & c);
      hexp = gv[3] | c;
      iexp = &tv;
      #1;
      checks++;
      if (h.t !== hexp || h.f !== ~hexp || i.t !== iexp || i.f !== ~iexp) begin
        failures++;
        $display("FAIL g=%b tm=%b: H=%b/%b I=%b/%b", gv, tv, h.t, h.f, i.t, i.f);
      end
    end
    for (int k = 0; k < 4; k++) begin
      g[k] = DR_EMPTY;
      tm[k] = DR_EMPTY;
    end
    #1;
    checks++;
    if (!dr_empty(h) || !dr_empty(i)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
