// Dual-rail input stage of the domino adder.
//
// Turns single-rail operand bits into dual-rail domino signals. While eval is
// low (the precharge phase of the clock) both rails of every bit are held at
// 0. While eval is high the true rail carries the bit and the false rail its
// complement, so exactly one rail of each pair rises. The adder's domino
// cells need both polarities of every input, and this is where they come
// from. Purely combinational: outputs follow eval and x with no delay.
// Ports: eval (clock phase, 1 = evaluate), x (WIDTH operand bits), y (WIDTH
// dual-rail signals). The width default is the 8 bits of the adder; the gating
// by the clock phase is this design's way of modelling the precharge.
module dr_encode
  import ling_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic                   eval,
  input  logic       [WIDTH-1:0] x,
  output dr_t        [WIDTH-1:0] y
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      y[i].t = eval & x[i];
      y[i].f = eval & ~x[i];
    end
  end

endmodule
