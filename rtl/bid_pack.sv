// bid_pack: encode sign, biased exponent and significand as a BID decimal64
// word. A significand below 2^53 uses the short form (exponent in bits 62:53);
// a larger one (up to 10^16-1 < 2^54) the long form with bits 62:61 = 11, the
// exponent in bits 60:51 and the low 51 significand bits in 50:0. The caller
// guarantees a canonical significand and an exponent within 0..767; exponent
// overflow and underflow are not handled by this adder. Purely combinational.
module bid_pack
  import bid_pkg::*;
(
  input  dfp_t        d,
  output logic [63:0] w
);
  always_comb begin
    if (d.sig[53])
      w = {d.sign, 2'b11, d.exp, d.sig[50:0]};
    else
      w = {d.sign, d.exp, d.sig[52:0]};
  end
endmodule
