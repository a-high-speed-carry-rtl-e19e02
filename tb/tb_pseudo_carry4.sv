// Self-checking test of pseudo_carry4 over all 64 combinations of the three
// generates and three shifted transmits. For each incoming pseudo-carry
// value hin (0 for h0, 1 for h1) the reference ripples the real carry from
// the bit below the section (t[j-1] & hin) upward and takes the pseudo-carry
// into bit k as g[k-1] | c[k-2].
module tb_pseudo_carry4;
  import ling_pkg::*;

  dr_t [2:0] g, tm;
  dr_t [3:1] h0, h1;
  int checks = 0;
  int failures = 0;

  pseudo_carry4 dut (.g(g), .tm(tm), .h0(h0), .h1(h1));

  function automatic logic [3:1] ref_h(input logic [2:0] gv, input logic [2:0] tv,
                                       input logic hin);
    logic [3:1] r;
    logic c;
    c = tv[0] & hin;            // real carry out of bit j-1
    r[1] = gv[0] | c;
    c = gv[0] | (tv[1] & c);    // carry out of bit j
    r[2] = gv[1] | c;
    c = gv[1] | (tv[2] & c);    // carry out of bit j+1
    r[3] = gv[2] | c;
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 64; n++) begin
      logic [2:0] gv, tv;
      logic [3:1] e0, e1;
      {gv, tv} = 6'(n);
      for (int k = 0; k < 3; k++) begin
        g[k]  = '{t: gv[k], f: ~gv[k]};
        tm[k] = '{t: tv[k], f: ~tv[k]};
      end
      e0 = ref_h(gv, tv, 1'b0);
      e1 = ref_h(gv, tv, 1'b1);
      #1;
      for (int k = 1; k <= 3; k++) begin
        checks++;
        if (h0[k].t !== e0[k] || h0[k].f !== ~e0[k] ||
            h1[k].t !== e1[k] || h1[k].f !== ~e1[k]) begin
          failures++;
          $display("FAIL g=%b tm=%b bit %0d: h0=%b/%b h1=%b/%b exp %b %b",
                   gv, tv, k, h0[k].t, h0[k].f, h1[k].t, h1[k].f, e0[k], e1[k]);
        end
      end
    end
    for (int k = 0; k < 3; k++) begin
      g[k] = DR_EMPTY;
      tm[k] = DR_EMPTY;
    end
    #1;
    for (int k = 1; k <= 3; k++) begin
      checks++;
      if (!dr_empty(h0[k]) || !dr_empty(h1[k])) failures++;
    end
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
