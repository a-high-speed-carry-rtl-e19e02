// Self-checking test of ling_hi_combine over all 16 input combinations:
// H = h_hi | i_hi & h_lo and I = i_hi & i_lo, both as valid dual-rail pairs,
// plus an empty-in, empty-out check.
module tb_ling_hi_combine;
  import ling_pkg::*;

  dr_t h_hi, i_hi, h_lo, i_lo, h, i;
  int checks = 0;
  int failures = 0;

  ling_hi_combine dut (.h_hi(h_hi), .i_hi(i_hi), .h_lo(h_lo), .i_lo(i_lo), .h(h), .i(i));

  initial begin
    for (int n = 0; n < 16; n++) begin
      logic [3:0] v;
      logic hexp, iexp;
      v = 4'(n);
      h_hi = '{t: v[3], f: ~v[3]};
      i_hi = '{t: v[2], f: ~v[2]};
      h_lo = '{t: v[1], f: ~v[1]};
      i_lo = '{t: v[0], f: ~v[0]};
      hexp = v[3] | (v[2] & v[1]);
      iexp = v[2] & v[0];
      #1;
      checks++;
      if (h.t !== hexp || h.f !== ~hexp || i.t !== iexp || i.f !== ~iexp) begin
        failures++;
        $display("FAIL in=%b: H=%b/%b I=%b/%b", v, h.t, h.f, i.t, i.f);
      end
    end
    h_hi = DR_EMPTY;
    i_hi = DR_EMPTY;
    h_lo = DR_EMPTY;
    i_lo = DR_EMPTY;
    #1;
    checks++;
    if (!dr_empty(h) || !dr_empty(i)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
