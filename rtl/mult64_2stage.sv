// mult64_2stage: two-stage pipelined W x W unsigned multiplier (W = 64).
//
// This is the one multiplier of the adder; it aligns A_N by a power of ten and
// does the reciprocal multiplication of the rounder. Stage 1 forms the four
// (W/2) x (W/2) partial products and registers them; stage 2 adds them with
// their offsets and registers the 2W-bit product. A result leaves two clock
// edges after its operands were presented with in_valid; one operation may
// start every cycle. Only the function and the two stages come from the design
// description; the partial-product split is this design's own.
module mult64_2stage #(
  parameter int unsigned W = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           out_valid,
  output logic [2*W-1:0] p
);
  localparam int unsigned H = W / 2;

  logic [W-1:0] pp_ll, pp_lh, pp_hl, pp_hh;
  logic         v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    pp_ll <= a[H-1:0] * b[H-1:0];
    pp_lh <= a[H-1:0] * b[W-1:H];
    pp_hl <= a[W-1:H] * b[H-1:0];
    pp_hh <= a[W-1:H] * b[W-1:H];
    p     <= (2*W)'(pp_ll)
           + ((2*W)'(pp_lh) << H)
           + ((2*W)'(pp_hl) << H)
           + ((2*W)'(pp_hh) << W);
  end
endmodule
