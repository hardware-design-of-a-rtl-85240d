// digit_counter: number of decimal digits of an unsigned binary integer.
//
// A leading-one detector gives the bit position m of the top 1 of x, so x lies
// in [2^m, 2^(m+1)-1]. A first table indexed by m holds n(m), the number of
// decimal digits of 2^m, which is the fewest digits any x with that m can
// have; the true count is n or n+1. A second table holds 10^n(m), the smallest
// power of ten above 2^m. One compare settles it: digits = (x < 10^n) ? n : n+1.
// Both tables are computed at elaboration. x = 0 counts as one digit. This is
// the structure of the counter the design describes (leading-one detector, two
// tables indexed by m, compare and select). W up to 64. Purely combinational.
module digit_counter
  import bid_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  output logic [4:0]   digits
);
  localparam int unsigned MW = $clog2(W);

  // digits of 2^m: count the powers of ten not above 2^m
  function automatic logic [4:0] digits_pow2(input int m);
    logic [63:0] v;
    logic [4:0]  n;
    v = 64'd1 << m;
    n = '0;
    for (int k = 0; k < 20; k++)
      if (pow10(5'(k)) <= v) n = n + 5'd1;
    return n;
  endfunction

  logic [4:0]  n_tab [W];
  logic [63:0] p_tab [W];

  for (genvar i = 0; i < int'(W); i++) begin : g_tab
    localparam logic [4:0] N = digits_pow2(i);
    assign n_tab[i] = N;
    assign p_tab[i] = pow10(N);
  end

  logic [MW-1:0] m;
  logic          zero;
  logic [4:0]    n;
  logic [63:0]   p;

  lod64 #(.W(W)) u_lod (.x(x), .m(m), .zero(zero));

  assign n      = n_tab[m];
  assign p      = p_tab[m];
  assign digits = (64'(x) < p) ? n : n + 5'd1;
endmodule
