// Self-checking test of dr_encode: with eval low every pair must be empty,
// with eval high each pair must carry the bit on its true rail and the
// complement on its false rail. Random operand values, default width 8.
module tb_dr_encode;
  import ling_pkg::*;

  localparam int unsigned W = 8;
  logic         eval;
  logic [W-1:0] x;
  dr_t  [W-1:0] y;
  int checks = 0;
  int failures = 0;

  dr_encode dut (.eval(eval), .x(x), .y(y));

  initial begin
    for (int n = 0; n < 200; n++) begin
      x = W'($urandom);
      eval = n[0];
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (eval ? (y[i].t !== x[i] || y[i].f !== ~x[i]) : (y[i].t || y[i].f)) begin
          failures++;
          $display("FAIL eval=%b x=%h bit %0d t=%b f=%b", eval, x, i, y[i].t, y[i].f);
        end
      end
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
