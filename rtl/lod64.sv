// lod64: binary leading-one detector. Gives the bit position m of the most
// significant 1 of x, and zero = 1 when x has no 1 (m is then 0). A plain
// priority encoder written as a loop. Purely combinational.
module lod64 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]         x,
  output logic [$clog2(W)-1:0] m,
  output logic                 zero
);
  always_comb begin
    m    = '0;
    zero = 1'b1;
    for (int i = 0; i < int'(W); i++)
      if (x[i]) begin
        m    = ($clog2(W))'(i);
        zero = 1'b0;
      end
  end
endmodule
