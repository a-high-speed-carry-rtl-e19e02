// Self-checking test of gpk_cell: all four operand combinations must give
// g = a&b, t = a|b (false rail = kill = ~a&~b) and d = a^b as valid pairs,
// and empty operands must give empty outputs.
module tb_gpk_cell;
  import ling_pkg::*;

  dr_t a, b, g, t, d;
  int checks = 0;
  int failures = 0;

  gpk_cell dut (.a(a), .b(b), .g(g), .t(t), .d(d));

  task automatic chk(input dr_t got, input logic exp, input string what);
    checks++;
    if (got.t !== exp || got.f !== ~exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b: t=%b f=%b expected %b", what, a.t, b.t, got.t, got.f, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic x, y;
      {x, y} = 2'(i);
      a = '{t: x, f: ~x};
      b = '{t: y, f: ~y};
      #1;
      chk(g, x & y, "generate");
      chk(t, x | y, "transmit");
      chk(d, x ^ y, "half sum");
      checks++;
      if (t.f !== (~x & ~y)) begin
        failures++;
        $display("FAIL kill");
      end
    end
    a = DR_EMPTY;
    b = DR_EMPTY;
    #1;
    checks++;
    if (!dr_empty(g) || !dr_empty(t) || !dr_empty(d)) begin
      failures++;
      $display("FAIL precharge not propagated");
    end
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
