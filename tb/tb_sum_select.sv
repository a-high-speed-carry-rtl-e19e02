// Self-checking test of sum_select over all 32 input combinations. The
// reference is the ordinary sum: the pseudo-carry h = hsel ? h1 : h0, the
// real carry into the bit is tprev & h, and s = d ^ carry. An empty select
// must leave the sum empty.
module tb_sum_select;
  import ling_pkg::*;

  dr_t d, tprev, hsel, h0, h1, s;
  int checks = 0;
  int failures = 0;

  sum_select dut (.d(d), .tprev(tprev), .hsel(hsel), .h0(h0), .h1(h1), .s(s));

  initial begin
    for (int n = 0; n < 32; n++) begin
      logic [4:0] v;
      logic h, sexp;
      v = 5'(n);
      d     = '{t: v[4], f: ~v[4]};
      tprev = '{t: v[3], f: ~v[3]};
      hsel  = '{t: v[2], f: ~v[2]};
      h0    = '{t: v[1], f: ~v[1]};
      h1    = '{t: v[0], f: ~v[0]};
      h = v[2] ? v[0] : v[1];
      sexp = v[4] ^ (v[3] & h);
      #1;
      checks++;
      if (s.t !== sexp || s.f !== ~sexp) begin
        failures++;
        $display("FAIL in=%b: s=%b/%b expected %b", v, s.t, s.f, sexp);
      end
    end
    hsel = DR_EMPTY;
    d = DR_EMPTY;
    #1;
    checks++;
    if (!dr_empty(s)) failures++;
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
