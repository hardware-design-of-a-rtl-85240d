// addsub_abs: the Add/Subtract and Absolute Value Unit.
//
// Computes z = |a + b| when eop = 0 and z = |a - b| when eop = 1, with
// neg = 1 when a - b was negative (Z_Isign of the algorithm). The subtraction
// is done once with a borrow; a negative difference is then negated. The
// caller keeps a + b below 2^W. Purely combinational.
module addsub_abs #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         eop,
  output logic [W-1:0] z,
  output logic         neg
);
  logic [W:0] diff;

  always_comb begin
    diff = {1'b0, a} - {1'b0, b};
    if (!eop) begin
      z   = a + b;
      neg = 1'b0;
    end else begin
      neg = diff[W];
      z   = neg ? W'(-diff) : diff[W-1:0];
    end
  end
endmodule
