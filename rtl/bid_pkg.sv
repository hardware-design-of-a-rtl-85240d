// bid_pkg: types and constants shared by the decimal64 BID adder.
//
// A decimal64 number is (-1)^S * 10^(E-398) * C, where C is an unsigned binary
// integer of at most 16 decimal digits (54 bits) and E a 10-bit biased exponent.
// The package holds the unpacked operand type, the rounding-mode encoding, the
// case encoding of the add/subtract algorithm, a power-of-ten function and the
// reciprocal constants of the rounder.
//
// Rounder constants: for a rounding of d digits (d = 0..19) the rounder
// multiplies its 64-bit input x by K_d = ceil(2^S_d / 10^d) with
// S_d = 64 + ceil(log2(10^d)) (S_0 = 64). K_d always lies in [2^64, 2^65), so
// only its low 64 bits are stored (rnd_klo) and the implicit 2^64 is added back
// as x << 64. With this choice floor(x*K_d / 2^S_d) = floor(x / 10^d) for every
// x < 2^64, and the low S_d bits of the product, F, classify the discarded
// fraction exactly: F < K_d means it is zero, F in [2^(S_d-1), 2^(S_d-1)+K_d)
// means it is exactly one half, and F >= 2^(S_d-1)+K_d means above one half.
// The encodings of the enums are this design's own.
package bid_pkg;

  localparam int unsigned P       = 16;   // decimal64 precision in digits
  localparam int unsigned BIAS    = 398;  // decimal64 exponent bias
  localparam int unsigned SIG_W   = 54;   // significand width
  localparam int unsigned EXP_W   = 10;   // biased exponent width
  localparam int unsigned MAX_D   = 19;   // largest rounding the rounder takes

  typedef logic [SIG_W-1:0] sig_t;
  typedef logic [EXP_W-1:0] exp_t;

  typedef struct packed {
    logic sign;
    exp_t exp;
    sig_t sig;
  } dfp_t;

  // Rounding-direction attributes of IEEE P754 for decimal arithmetic.
  typedef enum logic [2:0] {
    RTE = 3'd0,  // roundTiesToEven
    RTA = 3'd1,  // roundTiesToAway
    RTZ = 3'd2,  // roundTowardZero
    RTN = 3'd3,  // roundTowardNegative
    RTP = 3'd4   // roundTowardPositive
  } rnd_mode_e;

  // The three cases of the algorithm (Step 3).
  typedef enum logic [1:0] {
    CASE1 = 2'd1,  // r <= 19, K != 0: align by 10^K, add, round
    CASE2 = 2'd2,  // K == 0: add, round one digit only on overflow
    CASE3 = 2'd3   // r > 19: round B first, push A to 16 digits, add
  } add_case_e;

  // 10^i as a 64-bit integer, i = 0..19 (10^19 < 2^64).
  function automatic logic [63:0] pow10(input logic [4:0] i);
    logic [63:0] v;
    v = 64'd1;
    for (int k = 0; k < 19; k++)
      if (k < int'(i)) v = v * 64'd10;
    return v;
  endfunction

  // S_d: the shift of the rounder's reciprocal multiplication.
  function automatic logic [7:0] rnd_shift(input logic [4:0] d);
    case (d)
      5'd0:  return 8'd64;   5'd1:  return 8'd68;   5'd2:  return 8'd71;
      5'd3:  return 8'd74;   5'd4:  return 8'd78;   5'd5:  return 8'd81;
      5'd6:  return 8'd84;   5'd7:  return 8'd88;   5'd8:  return 8'd91;
      5'd9:  return 8'd94;   5'd10: return 8'd98;   5'd11: return 8'd101;
      5'd12: return 8'd104;  5'd13: return 8'd108;  5'd14: return 8'd111;
      5'd15: return 8'd114;  5'd16: return 8'd118;  5'd17: return 8'd121;
      5'd18: return 8'd124;  default: return 8'd128;
    endcase
  endfunction

  // K_d - 2^64, K_d = ceil(2^S_d / 10^d).
  function automatic logic [63:0] rnd_klo(input logic [4:0] d);
    case (d)
      5'd0:  return 64'h0000000000000000;
      5'd1:  return 64'h999999999999999a;
      5'd2:  return 64'h47ae147ae147ae15;
      5'd3:  return 64'h0624dd2f1a9fbe77;
      5'd4:  return 64'ha36e2eb1c432ca58;
      5'd5:  return 64'h4f8b588e368f0847;
      5'd6:  return 64'h0c6f7a0b5ed8d36c;
      5'd7:  return 64'had7f29abcaf48579;
      5'd8:  return 64'h5798ee2308c39dfa;
      5'd9:  return 64'h12e0be826d694b2f;
      5'd10: return 64'hb7cdfd9d7bdbab7e;
      5'd11: return 64'h5fd7fe17964955fe;
      5'd12: return 64'h19799812dea11198;
      5'd13: return 64'hc25c268497681c27;
      5'd14: return 64'h6849b86a12b9b01f;
      5'd15: return 64'h203af9ee756159b3;
      5'd16: return 64'hcd2b297d889bc2b7;
      5'd17: return 64'h70ef54646d496893;
      5'd18: return 64'h2725dd1d243aba0f;
      default: return 64'hd83c94fb6d2ac34b;
    endcase
  endfunction

endpackage
