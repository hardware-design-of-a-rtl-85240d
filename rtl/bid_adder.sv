// bid_adder: decimal64 adder/subtractor for the BID (binary integer decimal)
// encoding, with one shared 64x64 multiplier and variable latency.
//
// z = a + b (op = 0) or a - b (op = 1), correctly rounded in any of the five
// IEEE P754 decimal rounding directions, with the preferred exponent (the
// smaller input exponent when the result is exact). Infinities and NaNs are
// not handled (the `special` output flags such an input); exponent overflow
// and underflow are not handled either.
//
// Algorithm. Step 1 swaps the operands so that A_N has the larger exponent,
// forms K = |A.exp - B.exp| and the effective operation EOP. Step 2 counts the
// digits Qa of A_N. Step 3 picks a case from r = Qa + K:
//   Case 2 (K = 0): Z = |A_N +/- B_N|; it is the result unless Z >= 10^16,
//           when it is rounded by one digit (exponent + 1).
//   Case 1 (K != 0, r <= 19): Z = |10^K A_N +/- B_N| fits in 64 bits; it is
//           rounded by d1 = max(0, digits(Z) - 16), exponent B_N.exp + d1.
//   Case 3 (r > 19): B_N is rounded by d3 = K - g digits to B' (g = 16 - Qa)
//           with the Case 3 rounding rules, 10^g A_N +/- B' is formed at
//           exponent A_N.exp - g. An addition that reaches 10^16 goes through
//           the rounder a second time (one digit, with the first pass's
//           fraction as sticky); a subtraction whose exact value falls below
//           10^15 is recalculated with g + 1 and d3 - 1. The test is made on
//           the floor of the exact difference, 10^g A_N - q - (f != 0), not
//           on 10^g A_N - B': rounding B can lift a difference just below
//           10^15 to exactly 10^15, and the result would then keep one digit
//           too few. When the exact value was only a fraction below 10^15
//           the recalculated difference can round up to 10^16; it is then
//           returned as 10^15 at the first exponent.
//
// Hardware. The step-1 logic works on the input ports in the accepting cycle.
// One digit counter serves both Qa (step 1) and digits(Z) (Case 1); one
// add/subtract-and-absolute-value unit, one range detector and one power-of-
// ten table serve all cases. The rounder (bid_rounder) holds the only
// multiplier; alignment products 10^K A_N and 10^g A_N are issued to it as
// plain multiplies. A controller sequences one operation at a time; the
// results of Cases 2 and 3 that need no rounding bypass the rounder, and a
// Case 2 or Case 3 final sum is sent to the rounder speculatively in the cycle
// it is formed, so that only the range flag decides which result is taken.
//
// Interface: in_valid/in_ready handshake; in_ready is high when the adder is
// idle and in the cycle a result leaves, so operations can follow back to
// back. out_valid is high for one cycle with z and the status outputs. Latency, counted from the
// accepting cycle to the cycle out_valid is high: Case 2 3 cycles (5 when it
// rounds), Case 1 7 cycles, Case 3 7 cycles (9 with a second rounding, 13
// with a recalculation). The case structure, the shared multiplier and the
// 2-stage multiplier / 4-stage rounder pipelines follow the design
// description; the controller, the zero handling and the one-at-a-time
// scheduling are this design's own.
module bid_adder
  import bid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // request
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        op,          // 0 = a + b, 1 = a - b
  input  rnd_mode_e   mode,
  // result
  output logic        out_valid,
  output logic [63:0] z,
  output logic        special,     // an input was infinity or NaN (not handled)
  output add_case_e   out_case,    // which case the operation took
  output logic        out_rounded, // result came from the rounder
  output logic        out_round2,  // Case 3 second pass through the rounder
  output logic        out_recalc   // Case 3 recalculation
);
  typedef enum logic [3:0] {
    S_IDLE, S_C1_MUL, S_C1_WAIT, S_C1_ADD,
    S_C3_RB, S_C3_MA, S_C3_W1, S_C3_W2,
    S_ADD, S_CHECK, S_WAIT_R, S_OUT_BYP
  } state_e;

  state_e state;

  // ---------------- step 1, 2, 3 on the input ports ---------------------
  dfp_t       ua, ub, an_c, bn_c;
  logic       spa, spb, eop_c, swapped_c;
  exp_t       k_c;
  logic [4:0] qa_c, k_idx_c, g_c, d3_c;
  add_case_e  sel_c;

  bid_unpack u_unpack_a (.w(a), .d(ua), .special(spa));
  bid_unpack u_unpack_b (.w(b), .d(ub), .special(spb));

  bid_swap u_swap (
    .a(ua), .b(ub), .op(op),
    .an(an_c), .bn(bn_c), .eop(eop_c), .k(k_c), .swapped(swapped_c)
  );

  // shared digit counter: Qa in the accepting cycle, digits(Z) in Case 1
  logic [63:0] dc_x;
  logic [4:0]  dc_digits;
  digit_counter #(.W(64)) u_digits (.x(dc_x), .digits(dc_digits));
  assign qa_c = dc_digits;

  bid_case_sel u_case (
    .k(k_c), .qa(qa_c), .a_zero(an_c.sig == '0),
    .sel(sel_c), .k_idx(k_idx_c), .g(g_c), .d3(d3_c)
  );

  // ---------------- operation registers ----------------------------------
  dfp_t       an, bn;
  logic       eop;
  add_case_e  sel;
  logic [4:0] k_idx, g, d3;
  rnd_mode_e  mode_r;
  logic       recalc, round2;
  logic [63:0] a_scaled;           // 10^g * A_N (Case 3)

  // bypass result and final-round bookkeeping
  logic [63:0] byp_sig;
  exp_t        byp_exp;
  logic        res_sign;
  exp_t        rexp_base;          // exponent of a rounder result before carry
  logic        need_round, need_recalc;
  logic        res_from_rnd;
  logic [1:0]  cnt;

  // ---------------- shared datapath --------------------------------------
  logic [63:0] as_a, as_b, zi, zt;
  logic        neg, ge_hi, lt_lo;
  logic [63:0] p10;
  logic [4:0]  p10_idx;

  // rounder request
  logic        r_valid, r_is_mul, r_ovr, r_sub, r_odd, r_rnd2, r_prev, r_sign;
  logic [63:0] r_x, r_y;
  logic [4:0]  r_d;
  // rounder results
  logic        r_mul_valid, r_out_valid, r_inc, r_inexact, r_carry;
  logic [63:0] r_mul_p, r_q, r_z;

  pow10_lut u_p10 (.idx(p10_idx), .p(p10));

  addsub_abs #(.W(64)) u_addsub (.a(as_a), .b(as_b), .eop(eop), .z(zi), .neg(neg));

  // the too-few-digits test of a Case 3 subtraction looks at the floor of the
  // exact difference (zt), the too-many-digits test at the rounded sum (zi)
  logic [63:0] rc_in;
  assign rc_in = (state == S_ADD && sel == CASE3 && eop) ? zt : zi;

  range_check #(.PREC(P)) u_range (.z(rc_in), .ge_hi(ge_hi), .lt_lo(lt_lo));

  bid_rounder #(.PREC(P)) u_rounder (
    .clk(clk), .rst_n(rst_n),
    .in_valid(r_valid), .is_mul(r_is_mul), .x(r_x), .y(r_y), .d(r_d),
    .mode(mode_r), .sign(r_sign), .override_active_in(r_ovr),
    .sub_rnd_mode(r_sub), .a_odd_even(r_odd),
    .rnd2_active(r_rnd2), .rnd2_active_prev_dir(r_prev),
    .mul_valid(r_mul_valid), .mul_p(r_mul_p),
    .out_valid(r_out_valid), .q(r_q), .z(r_z),
    .inc(r_inc), .inexact(r_inexact), .carry(r_carry)
  );

  // sign of an exactly-zero sum of opposite-signed operands
  function automatic logic zero_sign(input logic eff_sub, input logic s,
                                     input rnd_mode_e m);
    return eff_sub ? (m == RTN) : s;
  endfunction

  // Case 1 digits to round off
  logic [4:0] d1;
  assign d1 = (dc_digits > 5'(P)) ? dc_digits - 5'(P) : 5'd0;

  always_comb begin
    dc_x     = in_ready ? 64'(an_c.sig) : zi;
    p10_idx  = (state == S_C1_MUL) ? k_idx : g;
    as_a     = 64'(an.sig);
    as_b     = 64'(bn.sig);
    zt       = zi;
    r_valid  = 1'b0;
    r_is_mul = 1'b0;
    r_x      = '0;
    r_y      = p10;
    r_d      = 5'd1;
    r_sign   = an.sign;
    r_ovr    = 1'b0;
    r_sub    = 1'b0;
    r_odd    = 1'b0;
    r_rnd2   = 1'b0;
    r_prev   = 1'b0;
    unique case (state)
      S_C1_MUL: begin
        r_valid  = 1'b1;
        r_is_mul = 1'b1;
        r_x      = 64'(an.sig);
      end
      S_C1_ADD: begin
        as_a    = r_mul_p;
        r_valid = 1'b1;
        r_x     = zi;
        r_d     = d1;
        r_sign  = an.sign ^ neg;
      end
      S_C3_RB: begin
        r_valid = 1'b1;
        r_x     = 64'(bn.sig);
        r_d     = d3;
        r_ovr   = 1'b1;
        r_sub   = eop;
        r_odd   = (g == 5'd0) && an.sig[0];
      end
      S_C3_MA: begin
        r_valid  = 1'b1;
        r_is_mul = 1'b1;
        r_x      = 64'(an.sig);
      end
      S_ADD: begin
        // speculative one-digit rounding of the final sum
        r_valid = 1'b1;
        r_d     = 5'd1;
        if (sel == CASE3) begin
          as_a   = a_scaled;
          as_b   = r_z;                     // B' from the first pass
          // floor of the exact result: B' = q + inc, and a nonzero
          // fraction of B lowers the floor of a difference by one
          zt     = eop ? zi + 64'(r_inc) - 64'(r_inexact) : zi - 64'(r_inc);
          r_rnd2 = 1'b1;
          r_prev = r_inexact;
          r_sign = an.sign;
        end else begin
          r_sign = an.sign ^ neg;
        end
        r_x = zt;
      end
      default: ;
    endcase
  end

  // ---------------- controller -------------------------------------------
  function automatic state_e first_state(input add_case_e c);
    unique case (c)
      CASE1:   return S_C1_MUL;
      CASE2:   return S_ADD;
      default: return S_C3_RB;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) state <= first_state(sel_c);
        S_C1_MUL:  state <= S_C1_WAIT;
        S_C1_WAIT: state <= S_C1_ADD;
        S_C1_ADD:  begin state <= S_WAIT_R; cnt <= 2'd3; end
        S_C3_RB:   state <= S_C3_MA;
        S_C3_MA:   state <= S_C3_W1;
        S_C3_W1:   state <= S_C3_W2;
        S_C3_W2:   state <= S_ADD;
        S_ADD:     state <= S_CHECK;
        S_CHECK: begin
          if (need_round) begin
            state <= S_WAIT_R;
            cnt   <= 2'd2;
          end else if (need_recalc) begin
            state <= S_C3_RB;
          end else begin
            state <= S_OUT_BYP;
          end
        end
        S_WAIT_R: begin
          if (cnt != 2'd0)   cnt   <= cnt - 2'd1;
          else if (in_valid) state <= first_state(sel_c);
          else               state <= S_IDLE;
        end
        S_OUT_BYP: state <= in_valid ? first_state(sel_c) : S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
        an      <= an_c;
        bn      <= bn_c;
        eop     <= eop_c;
        sel     <= sel_c;
        k_idx   <= k_idx_c;
        g       <= g_c;
        d3      <= d3_c;
        mode_r  <= mode;
        special <= spa || spb;
        recalc  <= 1'b0;
        round2  <= 1'b0;
    end
    unique case (state)
      S_C1_ADD: begin
        res_from_rnd <= 1'b1;
        rexp_base    <= bn.exp + exp_t'(d1);
        res_sign     <= (zi == '0) ? zero_sign(eop, an.sign, mode_r)
                                   : an.sign ^ neg;
      end
      S_C3_W2: a_scaled <= r_mul_p;
      S_ADD: begin
        byp_sig <= zi;
        if (sel == CASE3 && recalc && zi == pow10(5'(P))) begin
          // the recalculated difference rounded up to 10^16: the exact
          // value was just below 10^15 at the first exponent and rounds to it
          byp_sig     <= pow10(5'(P - 1));
          byp_exp     <= an.exp - exp_t'(g) + exp_t'(1);
          rexp_base   <= an.exp - exp_t'(g) + exp_t'(1);
          res_sign    <= an.sign;
          need_round  <= 1'b0;
          need_recalc <= 1'b0;
        end else if (sel == CASE3) begin
          byp_exp     <= an.exp - exp_t'(g);
          rexp_base   <= an.exp - exp_t'(g) + exp_t'(1);
          res_sign    <= an.sign;
          need_round  <= ge_hi && !eop && !recalc;
          need_recalc <= lt_lo && eop && !recalc;
        end else begin
          byp_exp     <= an.exp;
          rexp_base   <= an.exp + exp_t'(1);
          res_sign    <= (zi == '0) ? zero_sign(eop, an.sign, mode_r)
                                    : an.sign ^ neg;
          need_round  <= ge_hi;
          need_recalc <= 1'b0;
        end
      end
      S_CHECK: begin
        res_from_rnd <= need_round;
        if (need_round && sel == CASE3) round2 <= 1'b1;
        if (!need_round && need_recalc) begin
          recalc <= 1'b1;
          g      <= g + 5'd1;
          d3     <= d3 - 5'd1;
        end
      end
      default: ;
    endcase
  end

  // ---------------- result ----------------------------------------------
  dfp_t res;

  always_comb begin
    res.sign = res_sign;
    if (res_from_rnd) begin
      res.sig = sig_t'(r_z);
      res.exp = rexp_base + exp_t'(r_carry);
    end else begin
      res.sig = sig_t'(byp_sig);
      res.exp = byp_exp;
    end
  end

  bid_pack u_pack (.d(res), .w(z));

  // a new operation may be accepted in the cycle the previous result leaves
  assign in_ready    = (state == S_IDLE) || out_valid;
  assign out_valid   = (state == S_OUT_BYP) || (state == S_WAIT_R && cnt == 2'd0);
  assign out_case    = sel;
  assign out_rounded = res_from_rnd;
  assign out_round2  = round2;
  assign out_recalc  = recalc;

  // the fixed schedule must meet the rounder's result
  a_sched: assert property (@(posedge clk) disable iff (!rst_n)
                            (state == S_WAIT_R && cnt == 2'd0) |-> r_out_valid);
  // Case 3 alignment product is taken when the multiplier delivers it
  a_mul:   assert property (@(posedge clk) disable iff (!rst_n)
                            (state == S_C3_W2 || state == S_C1_ADD) |-> r_mul_valid);
endmodule
