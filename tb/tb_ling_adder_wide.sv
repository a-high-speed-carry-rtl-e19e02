// Self-checking test of ling_adder at the wider 16- and 32-bit
// configurations, where the 4-bit groups are joined by chains of combine
// cells. Both adders receive random operands plus the directed cases
// all-ones + 1 (a carry through every group) and all-ones + all-ones, one
// pair per clock; each result is checked in the high phase after the rising
// edge that sampled the operands and again while it is held in the
// following low phase.
module tb_ling_adder_wide;

  localparam int HALF = 2;
  localparam int N = 20000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] a16 = '0, b16 = '0, s16;
  logic [31:0] a32 = '0, b32 = '0, s32;
  logic        c16, c32;

  int checks = 0;
  int failures = 0;
  int n_carry_all = 0;

  ling_adder #(.WIDTH(16)) dut16 (.clk(clk), .rst_n(rst_n), .a(a16), .b(b16), .sum(s16), .cout(c16));
  ling_adder #(.WIDTH(32)) dut32 (.clk(clk), .rst_n(rst_n), .a(a32), .b(b32), .sum(s32), .cout(c32));

  always #HALF clk = ~clk;

  initial begin
    logic [16:0] e16;
    logic [32:0] e32;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    #1;
    for (int n = 0; n < N; n++) begin
      case (n)
        0: begin a16 = '1; b16 = 16'd1; a32 = '1; b32 = 32'd1; end
        1: begin a16 = '1; b16 = '1; a32 = '1; b32 = '1; end
        2: begin a16 = 16'h0f0f; b16 = 16'hf0f1; a32 = 32'h0f0f_0f0f; b32 = 32'hf0f0_f0f1; end
        default: begin
          a16 = 16'($urandom);
          b16 = 16'($urandom);
          a32 = $urandom;
          b32 = $urandom;
        end
      endcase
      e16 = {1'b0, a16} + {1'b0, b16};
      e32 = {1'b0, a32} + {1'b0, b32};
      if (a32[0] && b32[0] && &(a32[31:1] ^ b32[31:1])) n_carry_all++;
      for (int ph = 0; ph < 2; ph++) begin
        if (ph == 0) @(posedge clk);
        else @(negedge clk);
        #1;
        checks += 2;
        if ({c16, s16} !== e16) begin
          failures++;
          $display("FAIL 16b %h + %h = %h expected %h", a16, b16, {c16, s16}, e16);
        end
        if ({c32, s32} !== e32) begin
          failures++;
          $display("FAIL 32b %h + %h = %h expected %h", a32, b32, {c32, s32}, e32);
        end
      end
    end
    checks++;
    if (n_carry_all == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
