// Ling-Naffziger carry-propagate adder, dual-rail domino style (top level).
//
// An 8-bit valency-4 parallel-prefix adder built on Ling's pseudo-carry.
// Instead of the real carry c[i], the prefix tree computes the pseudo-carry
// H[i] = g[i] | c[i-1], with c[i] = t[i] & H[i]. H needs one product term
// less per group than the ordinary carry, and the missing t[i] is folded
// into the sum select gate at the end, where it is free. The datapath has
// these logic levels:
//   1. dr_encode       operands to dual-rail pairs (precharged while clk low)
//   2. gpk_cell        per bit: generate g, transmit t (false rail = kill),
//                      half sum d
//   3. ling_hi4        per 4-bit group: group pseudo-carry H and transmit I
//   4. ling_hi_combine joins groups: H(7:0) for the carry out (and, in wider
//                      configurations, the H arriving at each higher group)
//   5. pseudo_carry4   per group: pseudo-carries into bits 1..3 for both
//                      possible values of the H arriving at the group
//   6. sum_select      per bit: picks the pseudo-carry with the arriving H
//                      and forms s = h ? d ^ t[i-1] : d
//   7. output latch
// Levels 3 and 5 run in parallel, so the arriving H only has to steer
// values that already exist.
//
// Timing: a and b are sampled at the rising edge of clk. While clk is high
// the domino core evaluates and the output latch is transparent, so sum and
// cout show the new result within the same high phase. While clk is low
// every rail of the core is precharged to 0 and the latch holds the result.
// One add per clock cycle; the result of the operands sampled at a rising
// edge is valid from that high phase until the next rising edge. A latch,
// not a falling-edge flip-flop, ends the evaluate phase because the
// precharge starts at that same edge; the latch is intended, as in domino
// pipelines. A concurrent assertion checks that every output pair has
// evaluated (exactly one rail high) when the latch closes. rst_n clears the
// operand register and the latch asynchronously.
//
// The width, the Ling / Naffziger structure, the valency-4 groups, the
// conditional pseudo-carries and the sum select follow the adder being
// described; the register and latch placement, reset, carry-out and the serial chain of
// combine cells used when WIDTH is above 8 are this design's choices. There
// is no carry-in. WIDTH must be a multiple of 4.
module ling_adder
  import ling_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NSEC = WIDTH / 4;

  // Operand register.
  logic [WIDTH-1:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
    end
  end

  // Level 1: dual-rail operands, evaluated while clk is high.
  dr_t [WIDTH-1:0] a_dr, b_dr;

  dr_encode #(.WIDTH(WIDTH)) u_enc_a (.eval(clk), .x(a_q), .y(a_dr));
  dr_encode #(.WIDTH(WIDTH)) u_enc_b (.eval(clk), .x(b_q), .y(b_dr));

  // Level 2: bitwise generate, transmit and half sum.
  dr_t [WIDTH-1:0] g, t, d;
  // tm[i] is the transmit of the bit below bit i; there is no carry-in.
  dr_t [WIDTH-1:0] tm;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gpk_cell u_gpk (.a(a_dr[i]), .b(b_dr[i]), .g(g[i]), .t(t[i]), .d(d[i]));
    if (i == 0) begin : g_lsb
      assign tm[i] = DR_ZERO;
    end else begin : g_up
      assign tm[i] = t[i-1];
    end
  end

  // Levels 3 to 6 per 4-bit section.
  dr_t [WIDTH-1:0]     s_dr;       // dual-rail sum
  dr_t                 c_dr;       // dual-rail carry out
  dr_t [NSEC-1:0]      hg, ig;     // group H and I of each section
  dr_t [NSEC-1:0]      hp, ip;     // H and I from bit 0 to the top of section
  dr_t [NSEC-1:0]      hin;        // H arriving at each section
  dr_t [NSEC-1:0][3:1] pc0, pc1;   // conditional pseudo-carries

  for (genvar m = 0; m < NSEC; m++) begin : g_sec
    ling_hi4 u_hi4 (
      .g (g[4*m+3 -: 4]),
      .tm(tm[4*m+3 -: 4]),
      .h (hg[m]),
      .i (ig[m])
    );

    pseudo_carry4 u_pc (
      .g (g[4*m+2 -: 3]),
      .tm(tm[4*m+2 -: 3]),
      .h0(pc0[m]),
      .h1(pc1[m])
    );

    if (m == 0) begin : g_first
      assign hp[m]  = hg[m];
      assign ip[m]  = ig[m];
      assign hin[m] = DR_ZERO;
    end else begin : g_next
      ling_hi_combine u_comb (
        .h_hi(hg[m]),
        .i_hi(ig[m]),
        .h_lo(hp[m-1]),
        .i_lo(ip[m-1]),
        .h   (hp[m]),
        .i   (ip[m])
      );
      assign hin[m] = hp[m-1];
    end

    // Level 6: sum select gates of the section.
    for (genvar k = 0; k < 4; k++) begin : g_sum
      if (k == 0) begin : g_k0
        // The pseudo-carry into the section's lowest bit is hin itself.
        sum_select u_sel (
          .d(d[4*m]), .tprev(tm[4*m]), .hsel(hin[m]),
          .h0(DR_ZERO), .h1(DR_ONE), .s(s_dr[4*m])
        );
      end else begin : g_kn
        sum_select u_sel (
          .d(d[4*m+k]), .tprev(tm[4*m+k]), .hsel(hin[m]),
          .h0(pc0[m][k]), .h1(pc1[m][k]), .s(s_dr[4*m+k])
        );
      end
    end
  end

  assign c_dr = dr_and(t[WIDTH-1], hp[NSEC-1]);

  // Level 7: output latch. Transparent while the core evaluates, it holds
  // the result through the precharge phase.
  always_latch begin
    if (!rst_n) begin
      sum  = '0;
      cout = 1'b0;
    end else if (clk) begin
      for (int i = 0; i < WIDTH; i++) sum[i] = s_dr[i].t;
      cout = c_dr.t;
    end
  end

  // Completion: every output pair has exactly one rail high. It must hold
  // at the end of each evaluate phase, when the latch closes. The operand
  // register holds a defined value in and out of reset, so no reset
  // qualifier is needed.
  logic out_valid;

  always_comb begin
    out_valid = dr_valid(c_dr);
    for (int i = 0; i < WIDTH; i++) out_valid &= dr_valid(s_dr[i]);
  end

  a_evaluated: assert property (@(negedge clk) out_valid)
    else $error("adder outputs did not evaluate");

  initial begin
    assert (WIDTH % 4 == 0 && WIDTH >= 4) else $fatal(1, "WIDTH must be a multiple of 4");
  end

endmodule
