// pow10_lut: power-of-ten lookup table, 10^idx for idx = 0..19. It supplies
// the alignment factors 10^K (Case 1) and 10^g (Case 3) that feed the shared
// multiplier. Indices above 19 return 0 (10^20 does not fit in 64 bits; the
// controller never asks for them). The table is built at elaboration from
// 10^i = 10 * 10^(i-1). Purely combinational.
module pow10_lut
  import bid_pkg::*;
(
  input  logic [4:0]  idx,
  output logic [63:0] p
);
  logic [63:0] tab [20];

  for (genvar i = 0; i < 20; i++) begin : g_tab
    assign tab[i] = pow10(5'(i));
  end

  assign p = (idx < 5'd20) ? tab[idx] : '0;
endmodule
