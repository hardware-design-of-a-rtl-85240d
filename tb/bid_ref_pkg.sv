// bid_ref_pkg: reference model of decimal64 BID addition for the testbenches.
//
// Written independently of the RTL: it decodes both words, forms the exact sum
// in a 256-bit integer at the smaller exponent, and rounds it to 16 digits by
// plain division and remainder. When the exponent difference K exceeds 40 the
// smaller operand lies wholly below every rounding point of the result, so it
// is replaced by a unit "sticky" value at exponent (larger exponent - 21):
// the sum then falls in the same gap between rounding points and midpoints.
// Rounding modes: 0 ties-to-even, 1 ties-away, 2 toward zero, 3 toward
// negative, 4 toward positive.
package bid_ref_pkg;

  typedef logic [255:0] big_t;

  function automatic big_t p10big(input int n);
    big_t v = 256'd1;
    for (int i = 0; i < n; i++) v = v * 256'd10;
    return v;
  endfunction

  function automatic void decode(input logic [63:0] w, output logic s,
                                 output int e, output logic [63:0] c);
    s = w[63];
    if (w[62:61] == 2'b11) begin
      e = int'(w[60:51]);
      c = {11'd0, 3'b100, w[50:0]};
    end else begin
      e = int'(w[62:53]);
      c = {11'd0, w[52:0]};
    end
    if (c > 64'd9999999999999999) c = 0;
  endfunction

  function automatic logic [63:0] encode(input logic s, input int e,
                                         input logic [63:0] c);
    if (c >= 64'h20_0000_0000_0000)
      return {s, 2'b11, 10'(e), c[50:0]};
    else
      return {s, 10'(e), c[52:0]};
  endfunction

  function automatic int ndigits(input big_t v);
    int n = 1;
    big_t p = 256'd10;
    while (p <= v && n < 77) begin n++; p = p * 256'd10; end
    return n;
  endfunction

  // carry is set when the rounding increment overflowed to 10^16
  function automatic logic [63:0] ref_add(input logic [63:0] aw,
                                          input logic [63:0] bw,
                                          input logic op, input int mode,
                                          output logic carry);
    logic sa, sb, sh, sl, sg;
    int ea, eb, eh, el, k, base, nd, d;
    logic [63:0] ca, cb, ch, cl;
    big_t vh, vl, mag, pw, q, r;
    logic up;
    carry = 1'b0;
    decode(aw, sa, ea, ca);
    decode(bw, sb, eb, cb);
    sb = sb ^ op;
    if (ea >= eb) begin sh = sa; eh = ea; ch = ca; sl = sb; el = eb; cl = cb; end
    else          begin sh = sb; eh = eb; ch = cb; sl = sa; el = ea; cl = ca; end
    k = eh - el;
    if (ch == 0) begin
      vh = 0; vl = big_t'(cl); base = el;
    end else if (k <= 40) begin
      vh = big_t'(ch) * p10big(k); vl = big_t'(cl); base = el;
    end else begin
      vh = big_t'(ch) * p10big(21); vl = (cl != 0) ? 256'd1 : 256'd0; base = eh - 21;
    end
    if (sh == sl) begin mag = vh + vl; sg = sh; end
    else if (vh >= vl) begin mag = vh - vl; sg = sh; end
    else begin mag = vl - vh; sg = sl; end
    if (mag == 0) begin
      sg = (sh != sl) ? (mode == 3) : sh;
      return encode(sg, base, 64'd0);
    end
    nd = ndigits(mag);
    if (nd <= 16) return encode(sg, base, 64'(mag));
    d  = nd - 16;
    pw = p10big(d);
    q  = mag / pw;
    r  = mag % pw;
    case (mode)
      0: up = (2*r > pw) || (2*r == pw && q[0]);
      1: up = (2*r >= pw);
      2: up = 1'b0;
      3: up = (r != 0) && sg;
      default: up = (r != 0) && !sg;
    endcase
    if (up) q = q + 1;
    if (q == p10big(16)) begin q = p10big(15); d = d + 1; carry = 1'b1; end
    return encode(sg, base + d, 64'(q));
  endfunction

endpackage
