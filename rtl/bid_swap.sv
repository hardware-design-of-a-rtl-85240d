// bid_swap: Step 1 of the BID add/subtract algorithm.
//
// Compares the biased exponents, swaps the operands so that the first output
// (AN) has the larger or equal exponent, and computes the effective operation
// EOP = OP xor A.sign xor B.sign (0 = magnitudes add, 1 = magnitudes subtract)
// and K = |A.exp - B.exp|. The subtraction is folded into B's sign before the
// swap (B's effective sign is B.sign xor OP), so AN.sign and BN.sign are the
// signs with which the two magnitudes enter the sum whichever way the swap
// went. Purely combinational.
module bid_swap
  import bid_pkg::*;
(
  input  dfp_t a,
  input  dfp_t b,
  input  logic op,        // 0 = add, 1 = subtract (a - b)
  output dfp_t an,        // operand with the larger exponent
  output dfp_t bn,        // the other operand
  output logic eop,       // effective operation
  output exp_t k,         // exponent difference
  output logic swapped    // 1 when b became AN
);
  dfp_t b_eff;
  logic [EXP_W:0] diff;

  always_comb begin
    b_eff      = b;
    b_eff.sign = b.sign ^ op;
    diff       = {1'b0, a.exp} - {1'b0, b.exp};
    swapped    = diff[EXP_W];           // a.exp < b.exp
    an         = swapped ? b_eff : a;
    bn         = swapped ? a : b_eff;
    k          = swapped ? exp_t'(-diff) : diff[EXP_W-1:0];
    eop        = op ^ a.sign ^ b.sign;
  end
endmodule
