// bid_case_sel: Step 3 of the BID add/subtract algorithm, the case choice.
//
// With K the exponent difference and Qa the digit count of the aligned-up
// operand A_N, r = Qa + K bounds the digits of 10^K * A_N. The 64-bit rounder
// takes at most 20 digits, so:
//   Case 2: K == 0 (no alignment, at most one digit to round off);
//   Case 1: K != 0 and r <= 19 (10^K * A_N fits, align and round);
//   Case 3: r > 19 (round B_N by d3 = K - g digits first, g = 16 - Qa).
// A_N = 0 is sent to Case 1 whatever K is: the product 10^K * 0 is zero, the
// result is B_N exactly, and the power-of-ten index is then held at 0 because
// 10^K may not exist for a large K. This zero handling is this design's own.
// d3 is clamped to 19: once d3 > 17 the rounded-off B_N (< 10^16) is a
// nonzero fraction below 1/10 of a unit or zero, whatever d3 is, so the
// rounding comes out the same. Purely combinational.
module bid_case_sel
  import bid_pkg::*;
(
  input  exp_t       k,        // |A.exp - B.exp|
  input  logic [4:0] qa,       // digits(A_N), 1..16
  input  logic       a_zero,   // A_N significand is zero
  output add_case_e  sel,
  output logic [4:0] k_idx,    // power-of-ten index for Case 1
  output logic [4:0] g,        // 16 - Qa
  output logic [4:0] d3        // min(K - g, 19)
);
  logic [EXP_W:0] r;
  logic [EXP_W:0] d3_full;

  always_comb begin
    r       = {1'b0, k} + (EXP_W+1)'(qa);
    g       = 5'(P) - qa;
    d3_full = {1'b0, k} - (EXP_W+1)'(g);
    d3      = (d3_full > (EXP_W+1)'(MAX_D)) ? 5'(MAX_D) : d3_full[4:0];
    if (k == '0)
      sel = CASE2;
    else if (a_zero || r <= (EXP_W+1)'(19))
      sel = CASE1;
    else
      sel = CASE3;
    k_idx = (a_zero || k > exp_t'(19)) ? 5'd0 : k[4:0];
  end
endmodule
