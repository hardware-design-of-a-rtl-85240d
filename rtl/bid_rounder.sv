// bid_rounder: four-stage BID rounder with the adder's shared multiplier.
//
// A ROUND operation takes an unsigned 64-bit x and a digit count d (0..19) and
// returns q = floor(x / 10^d) (the truncated value), z = q + inc (the value
// rounded off by d digits in the requested direction), the increment inc, and
// inexact (the discarded fraction f was nonzero). z = 10^PREC after the
// increment is returned as 10^(PREC-1) with carry = 1, so the caller raises
// the exponent by one more.
//
// How it works: x is multiplied by the reciprocal constant K_d of bid_pkg on
// the shared 64x64 multiplier (the implicit 2^64 of K_d is added back as
// x << 64). q is the product shifted right by S_d; the low S_d bits, F, are
// compared with K_d and with 2^(S_d-1) + K_d to tell f = 0, f = 1/2 and
// f > 1/2 exactly. The reciprocal method follows the BID rounder that this
// adder extends; the constants and the exact compare bounds are this design's
// own derivation.
//
// Control inputs that extend a plain rounder:
//   override_active_in    Case 3: x is B_N being rounded before it is added
//                         to or subtracted from 10^g * A_N; the increment
//                         follows the Case 3 table, where for a subtraction
//                         an increment of B' lowers the result.
//   sub_rnd_mode          the effective operation is a subtraction (Case 3).
//   a_odd_even            parity of 10^g * A_N; the parity used for
//                         ties-to-even in Case 3 is that of 10^g * A_N +/- q.
//   rnd2_active           second pass of a Case 3 result through the rounder:
//                         x is the truncated sum, so the first rounding is
//                         not rounded again.
//   rnd2_active_prev_dir  on a second pass: the first pass discarded a
//                         nonzero fraction (a sticky bit below the new digit).
//   sign                  sign of the result, for the directed modes.
// A MUL operation (is_mul = 1) multiplies x by y and returns the low 64 bits
// on mul_p. The multiplier and the control bit names come from the design
// description; the stage split is this design's own.
//
// Timing: an operation is presented with in_valid in cycle c (combinational
// inputs). Stage 1 (constant lookup, partial products) registers at the end
// of c, stage 2 (product) at c+1: mul_p/mul_valid are valid in cycle c+2.
// Stage 3 (shift, fraction compare) registers at c+2 and stage 4 (decision,
// increment, carry) at c+3: out_valid and the result are valid in cycle c+4.
// A new operation may start every cycle.
module bid_rounder
  import bid_pkg::*;
#(
  parameter int unsigned PREC = P
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        is_mul,
  input  logic [63:0] x,
  input  logic [63:0] y,
  input  logic [4:0]  d,
  input  rnd_mode_e   mode,
  input  logic        sign,
  input  logic        override_active_in,
  input  logic        sub_rnd_mode,
  input  logic        a_odd_even,
  input  logic        rnd2_active,
  input  logic        rnd2_active_prev_dir,
  output logic        mul_valid,
  output logic [63:0] mul_p,
  output logic        out_valid,
  output logic [63:0] q,
  output logic [63:0] z,
  output logic        inc,
  output logic        inexact,
  output logic        carry
);
  typedef struct packed {
    logic        is_mul;
    logic [63:0] x;
    logic [4:0]  d;
    rnd_mode_e   mode;
    logic        sign;
    logic        ovr;
    logic        sub;
    logic        a_odd;
    logic        rnd2;
    logic        prev;
  } side_t;

  side_t side_in, side1, side2, side3;
  logic  v1, v2, v3;

  // ---------------- stage 1 and 2: shared multiplier --------------------
  logic [63:0]  mb;
  logic [127:0] prod;
  logic         prod_valid;

  assign mb = is_mul ? y : rnd_klo(d);

  mult64_2stage #(.W(64)) u_mult (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a(x), .b(mb), .out_valid(prod_valid), .p(prod)
  );

  always_comb begin
    side_in.is_mul = is_mul;
    side_in.x      = x;
    side_in.d      = d;
    side_in.mode   = mode;
    side_in.sign   = sign;
    side_in.ovr    = override_active_in;
    side_in.sub    = sub_rnd_mode;
    side_in.a_odd  = a_odd_even;
    side_in.rnd2   = rnd2_active;
    side_in.prev   = rnd2_active_prev_dir;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      v3        <= v2 && !side2.is_mul;
      out_valid <= v3;
    end
  end

  always_ff @(posedge clk) begin
    side1 <= side_in;
    side2 <= side1;
  end

  assign mul_valid = v2 && side2.is_mul;
  assign mul_p     = prod[63:0];

  // ---------------- stage 3: quotient and fraction class ----------------
  logic [128:0] full, frac, kd, half, mask;
  logic [7:0]   sh;
  logic [63:0]  q3;
  logic         nz3, eq3, gt3;

  always_comb begin
    sh   = rnd_shift(side2.d);
    full = {1'b0, prod} + ({65'd0, side2.x} << 64);
    kd   = {64'd0, 1'b1, rnd_klo(side2.d)};
    mask = (129'd1 << sh) - 129'd1;
    half = 129'd1 << (sh - 8'd1);
    frac = full & mask;
    q3   = 64'(full >> sh);
    nz3  = (frac >= kd);
    eq3  = (frac >= half) && (frac < half + kd);
    gt3  = (frac >= half + kd);
  end

  logic [63:0] q_s3;
  logic        nz_s3, eq_s3, gt_s3;

  always_ff @(posedge clk) begin
    side3 <= side2;
    q_s3  <= q3;
    nz_s3 <= nz3;
    eq_s3 <= eq3;
    gt_s3 <= gt3;
  end

  // ---------------- stage 4: direction, increment, carry ----------------
  logic        nz4, eq4, gt4, odd4, sub4, inc4, carry4;
  logic [63:0] z4;

  always_comb begin
    // on a second pass the first pass's nonzero fraction lies below the digit
    // being rounded now: it turns an exact half into "above half"
    nz4  = nz_s3 || (side3.rnd2 && side3.prev);
    eq4  = eq_s3 && !(side3.rnd2 && side3.prev);
    gt4  = gt_s3 || (eq_s3 && side3.rnd2 && side3.prev);
    odd4 = q_s3[0] ^ (side3.ovr && side3.a_odd);
    sub4 = side3.ovr && side3.sub;
    unique case (side3.mode)
      RTZ:     inc4 = sub4 && nz4;
      RTA:     inc4 = sub4 ? gt4 : (gt4 || eq4);
      RTE:     inc4 = gt4 || (eq4 && odd4);
      RTP:     inc4 = nz4 && (sub4 ?  side3.sign : !side3.sign);
      RTN:     inc4 = nz4 && (sub4 ? !side3.sign :  side3.sign);
      default: inc4 = 1'b0;
    endcase
    z4     = q_s3 + 64'(inc4);
    carry4 = (z4 == pow10(5'(PREC)));
    if (carry4) z4 = pow10(5'(PREC - 1));
  end

  always_ff @(posedge clk) begin
    q       <= q_s3;
    z       <= z4;
    inc     <= inc4;
    inexact <= nz4;
    carry   <= carry4;
  end

  // a rounding is never asked for more digits than the constants cover
  a_d_range: assert property (@(posedge clk) disable iff (!rst_n)
                              (in_valid && !is_mul) |-> (d <= 5'(MAX_D)));
endmodule
