// Self-checking test of the dual-rail gate functions in ling_pkg.
// For every valid dual-rail input combination each function must return a
// valid pair whose true rail equals the single-rail result, and for every
// input combination with an empty (precharged) operand the result must be
// empty or, for AND/OR with a controlling value, still monotonic (never a
// high rail that a full evaluation would not raise).
module tb_ling_pkg;
  import ling_pkg::*;

  int checks = 0;
  int failures = 0;

  function automatic dr_t mk(input logic v);
    return '{t: v, f: ~v};
  endfunction

  task automatic chk(input dr_t got, input logic exp, input string what);
    checks++;
    if (got.t !== exp || got.f !== ~exp) begin
      failures++;
      $display("FAIL %s: got t=%b f=%b expected %b", what, got.t, got.f, exp);
    end
  endtask

  task automatic chk_empty(input dr_t got, input string what);
    checks++;
    if (!dr_empty(got)) begin
      failures++;
      $display("FAIL %s: expected empty, got t=%b f=%b", what, got.t, got.f);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic x, y, s;
      {s, x, y} = 3'(i);
      chk(dr_not(mk(x)), ~x, "not");
      chk(dr_and(mk(x), mk(y)), x & y, "and");
      chk(dr_or(mk(x), mk(y)), x | y, "or");
      chk(dr_xor(mk(x), mk(y)), x ^ y, "xor");
      chk(dr_mux(mk(s), mk(x), mk(y)), s ? y : x, "mux");
      checks++;
      if (!dr_valid(mk(x)) || dr_valid(DR_EMPTY) || dr_empty(mk(x))) failures++;
    end
    // All inputs empty: every evaluating function stays empty.
    chk_empty(dr_not(DR_EMPTY), "not empty");
    chk_empty(dr_and(DR_EMPTY, DR_EMPTY), "and empty");
    chk_empty(dr_or(DR_EMPTY, DR_EMPTY), "or empty");
    chk_empty(dr_xor(DR_EMPTY, DR_EMPTY), "xor empty");
    chk_empty(dr_xor(DR_EMPTY, mk(1'b1)), "xor half empty");
    chk_empty(dr_mux(DR_EMPTY, mk(1'b0), mk(1'b1)), "mux empty select");
    chk_empty(dr_mux(mk(1'b1), mk(1'b0), DR_EMPTY), "mux empty data");
    chk(DR_ZERO, 1'b0, "const zero");
    chk(DR_ONE, 1'b1, "const one");
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
