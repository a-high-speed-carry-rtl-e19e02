// End-to-end, full-size test of ling_adder at its default 8-bit width.
//
// Every one of the 65,536 operand pairs is added once, one pair per clock
// cycle. Operands change in the low (precharge) phase and are sampled at the
// rising edge. The test checks, against a + b computed in the testbench:
//   - the outputs still hold the previous sum just before the rising edge,
//     show the new sum and carry out in the high phase that follows it, and
//     keep them through the next low phase (one add per cycle);
//   - in the low phase every rail of the dual-rail sum and carry out is 0
//     (the core precharges).
// It also counts how often each mechanism of the adder was exercised and
// fails if any never was: precharge, carry out, a pseudo-carry arriving at
// the upper 4-bit section, that pseudo-carry selecting a precomputed value
// that differs from the other choice, a carry rippling through all bits,
// and a pseudo-carry that is 1 while the real carry is 0 (Ling's H without
// the transmit of the bit below).
module tb_ling_adder;
  import ling_pkg::*;

  localparam int unsigned W = 8;
  localparam int HALF = 2;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [W-1:0] sum;
  logic         cout;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_precharge = 0, n_cout = 0, n_hin = 0, n_select_diff = 0;
  int n_full_ripple = 0, n_h_without_c = 0;

  ling_adder dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .cout(cout));

  always #HALF clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t a=%h b=%h: %s", $time, a, b, msg);
  endtask

  initial begin
    logic [W:0]   prev, exp;
    logic [W-1:0] g, t;
    logic [W:0]   c;        // c[i+1] = carry out of bit i
    logic         selects_differ;

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    #1;
    checks++;
    if ({cout, sum} !== '0) fail("result after reset");  // 0 + 0 held
    prev = '0;

    for (int n = 0; n < (1 << (2 * W)); n++) begin
      // Low phase: new operands, core precharged.
      {a, b} = (2 * W)'(n);
      exp = {1'b0, a} + {1'b0, b};
      checks++;
      if ({cout, sum} !== prev) fail("result changed before the rising edge");
      checks++;
      begin
        logic empty;
        empty = 1'b1;
        for (int i = 0; i < W; i++) empty &= dr_empty(dut.s_dr[i]);
        if (empty && dr_empty(dut.c_dr)) n_precharge++;
        else fail("sum not precharged");
      end

      @(posedge clk);
      #1;
      // High phase: the new result is already out.
      checks++;
      if ({cout, sum} !== exp) fail($sformatf("sum %h expected %h", {cout, sum}, exp));
      // Mechanism coverage, from the evaluated core and the operands.
      g = a & b;
      t = a | b;
      c[0] = 1'b0;
      for (int i = 0; i < W; i++) c[i+1] = g[i] | (t[i] & c[i]);
      for (int i = 1; i < W; i++)
        if ((g[i-1] | c[i-1]) && !c[i]) n_h_without_c++;
      if (g[0] && &t[W-1:1] && !(|g[W-1:1])) n_full_ripple++;
      if (dut.hin[1].t) n_hin++;
      selects_differ = 1'b0;
      for (int k = 1; k < 4; k++)
        if (dut.pc0[1][k].t != dut.pc1[1][k].t) selects_differ = 1'b1;
      if (dut.hin[1].t && selects_differ) n_select_diff++;
      if (exp[W]) n_cout++;

      @(negedge clk);
      #1;
      // Low phase again: the result is held while the core precharges.
      checks++;
      if ({cout, sum} !== exp) fail($sformatf("held sum %h expected %h", {cout, sum}, exp));
      prev = exp;
    end

    checks++;
    if (n_precharge == 0) fail("precharge never seen");
    checks++;
    if (n_cout == 0) fail("carry out never seen");
    checks++;
    if (n_hin == 0) fail("pseudo-carry into upper section never seen");
    checks++;
    if (n_select_diff == 0) fail("select between differing pseudo-carries never seen");
    checks++;
    if (n_full_ripple == 0) fail("full-width ripple never seen");
    checks++;
    if (n_h_without_c == 0) fail("pseudo-carry without real carry never seen");
    $display("adds=%0d cycles=%0d precharge=%0d cout=%0d hin=%0d select_diff=%0d full_ripple=%0d h_without_c=%0d",
             1 << (2 * W), cycles, n_precharge, n_cout, n_hin, n_select_diff, n_full_ripple,
             n_h_without_c);
    // One add per clock: the whole sweep took one cycle per operand pair.
    checks++;
    if (cycles != (1 << (2 * W)) + 2) fail($sformatf("took %0d cycles", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((1 << (2 * W)) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
