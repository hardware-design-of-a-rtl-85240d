// bid_unpack: decode one decimal64 word in the BID (binary integer) encoding.
//
// Bit 63 is the sign. When bits 62:61 are not 11, the biased exponent is bits
// 62:53 and the significand is bits 52:0. When they are 11 (and bits 60:59 are
// not 11), the exponent is bits 60:51 and the significand is 100 followed by
// bits 50:0. A significand above 10^16-1 is non-canonical and reads as zero, as
// the standard requires. Infinities and NaNs (bits 62:59 = 1111) are flagged on
// `special` only; the adder does not handle them (neither does the design this
// follows). Purely combinational.
module bid_unpack
  import bid_pkg::*;
(
  input  logic [63:0] w,        // BID decimal64 word
  output dfp_t        d,        // sign, biased exponent, significand
  output logic        special   // infinity or NaN encoding
);
  sig_t sig_raw;
  exp_t exp_raw;

  always_comb begin
    special = (w[62:59] == 4'b1111);
    if (w[62:61] == 2'b11) begin
      exp_raw = w[60:51];
      sig_raw = {3'b100, w[50:0]};
    end else begin
      exp_raw = w[62:53];
      sig_raw = {1'b0, w[52:0]};
    end
    d.sign = w[63];
    d.exp  = exp_raw;
    d.sig  = (64'(sig_raw) > pow10(5'(P)) - 64'd1) ? '0 : sig_raw;
  end
endmodule
