// range_check: the significand range detector. ge_hi = 1 when z >= 10^P (too
// many digits: the result must go through the rounder, Case 2, or through it a
// second time, Case 3 addition); lt_lo = 1 when z < 10^(P-1) (too few digits:
// Case 3 subtraction must be recalculated). Two constant compares; purely
// combinational.
module range_check
  import bid_pkg::*;
#(
  parameter int unsigned PREC = P
) (
  input  logic [63:0] z,
  output logic        ge_hi,
  output logic        lt_lo
);
  assign ge_hi = (z >= pow10(5'(PREC)));
  assign lt_lo = (z <  pow10(5'(PREC - 1)));
endmodule
