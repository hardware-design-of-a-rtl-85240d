// tb_bid_case_sel: checks the case choice of Step 3 (Case 2 for K = 0, Case 1
// for r = Qa + K <= 19 or a zero A_N, Case 3 otherwise), g = 16 - Qa, the
// clamped d3 = min(K - g, 19) and the power-of-ten index, over all Qa and a
// sweep of K including the r = 19/20 boundary.
module tb_bid_case_sel;
  import bid_pkg::*;

  exp_t k;
  logic [4:0] qa, k_idx, g, d3;
  logic a_zero;
  add_case_e sel;
  int checks = 0, failures = 0;

  bid_case_sel dut (.k(k), .qa(qa), .a_zero(a_zero), .sel(sel), .k_idx(k_idx),
                    .g(g), .d3(d3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add_case_e want;
    int wd3;
    for (int q = 1; q <= 16; q++)
      for (int kk = 0; kk < 768; kk += ((kk < 40) ? 1 : 37))
        for (int z = 0; z < 2; z++) begin
          k = 10'(kk); qa = 5'(q); a_zero = 1'(z); #1;
          if (kk == 0) want = CASE2;
          else if (z == 1 || q + kk <= 19) want = CASE1;
          else want = CASE3;
          wd3 = kk - (16 - q);
          if (wd3 > 19) wd3 = 19;
          checks++;
          if (sel !== want || g !== 5'(16 - q) ||
              (want == CASE3 && d3 !== 5'(wd3)) ||
              (want == CASE1 && k_idx !== ((z == 1) ? 5'd0 : 5'(kk)))) begin
            failures++;
            $display("FAIL k=%0d qa=%0d z=%0d sel=%0d g=%0d d3=%0d", kk, q, z, sel, g, d3);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
