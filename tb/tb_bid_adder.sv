// tb_bid_adder: end-to-end test of the decimal64 BID adder at its default
// parameters.
//
// Drives directed cases (the worked examples of the algorithm: a Case 3
// second rounding, a Case 3 recalculation, the rounding-direction example of
// the Case 3 table, a rounding carry to 10^16, zeros) and then ten million
// random operations whose exponent differences are spread so that every case
// occurs. Each result is compared with bid_ref_pkg::ref_add, an independent
// exact model. The latency of every operation is checked against the
// schedule (Case 2: 3 or 5 cycles, Case 1: 7, Case 3: 7, 9 or 13) and each
// mechanism (the three cases, the rounder bypass, the Case 2 rounding, the
// second rounding, the recalculation, the rounding carry, a zero operand,
// a request accepted in the cycle the previous result leaves, every rounding
// mode) is counted; one that never happened is a failure.
module tb_bid_adder;
  import bid_pkg::*;
  import bid_ref_pkg::*;

  localparam int NRAND = 10_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid, in_ready, op, out_valid, special;
  logic out_rounded, out_round2, out_recalc;
  logic [63:0] a, b, z;
  rnd_mode_e mode;
  add_case_e out_case;

  int checks = 0, failures = 0;
  int n_case1 = 0, n_case2_byp = 0, n_case2_rnd = 0, n_case3 = 0;
  int n_round2 = 0, n_recalc = 0, n_carry = 0, n_zero = 0, n_b2b = 0;
  int n_mode [5] = '{0, 0, 0, 0, 0};

  bid_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .op(op), .mode(mode), .out_valid(out_valid), .z(z),
    .special(special), .out_case(out_case), .out_rounded(out_rounded),
    .out_round2(out_round2), .out_recalc(out_recalc)
  );

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (250_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] mk(input logic s, input int e_unbiased,
                                     input logic [63:0] c);
    return encode(s, e_unbiased + 398, c);
  endfunction

  // a broken adder would otherwise keep the run going for minutes
  task automatic stop_early(input string why);
    failures++;
    $display("stopping: %s", why);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // run one operation; returns the result word
  task automatic run(input logic [63:0] aw, input logic [63:0] bw,
                     input logic o, input int m, output logic [63:0] res);
    logic [63:0] exp_w;
    logic carry;
    int lat, want;
    exp_w = ref_add(aw, bw, o, m, carry);
    // called right after a result was seen: presenting the next request in
    // that same cycle tests back-to-back acceptance
    if (in_ready && out_valid) n_b2b++;
    if (!in_ready) @(negedge clk);
    lat = 0;
    while (!in_ready && lat < 100) begin @(negedge clk); lat++; end
    if (!in_ready) stop_early("adder never ready");
    a = aw; b = bw; op = o; mode = rnd_mode_e'(m); in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
    if (!out_valid) stop_early("no result");
    res = z;
    checks++;
    if (z !== exp_w) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH a=%h b=%h op=%0d mode=%0d got=%h want=%h case=%0d",
                 aw, bw, o, m, z, exp_w, out_case);
    end
    // latency of the schedule
    unique case (out_case)
      CASE1:   want = 7;
      CASE2:   want = out_rounded ? 5 : 3;
      default: want = out_recalc ? 13 : (out_round2 ? 9 : 7);
    endcase
    checks++;
    if (lat != want) begin
      failures++;
      $display("LATENCY case=%0d got=%0d want=%0d", out_case, lat, want);
    end
    if (failures >= 1000) stop_early("too many failures");
    // mechanism counters
    unique case (out_case)
      CASE1: n_case1++;
      CASE2: if (out_rounded) n_case2_rnd++; else n_case2_byp++;
      default: n_case3++;
    endcase
    if (out_round2) n_round2++;
    if (out_recalc) n_recalc++;
    if (carry && out_rounded) n_carry++;
    n_mode[m]++;
  endtask

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want,
                           input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("DIRECTED %s got=%h want=%h", what, got, want);
    end
  endtask

  function automatic logic [63:0] rand_sig();
    int nd;
    logic [63:0] v, lim;
    int sel;
    nd  = 1 + int'($urandom_range(15));
    sel = int'($urandom_range(9));
    lim = 64'd1;
    for (int i = 0; i < nd; i++) lim = lim * 64'd10;
    case (sel)
      0: return lim - 64'd1;                // all nines
      1: return lim / 64'd10;               // 10...0
      2: return 64'd0;
      default: begin
        v = {$urandom, $urandom};
        return v % lim;
      end
    endcase
  endfunction

  initial begin
    logic [63:0] r;
    logic s1, s2;
    int e1, e2, kk, ksel;
    in_valid = 1'b0; a = '0; b = '0; op = 1'b0; mode = RTE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // --- directed: worked examples of the algorithm ---
    // Case 3 addition needing a second rounding (RTZ):
    // 9999999999995555e11 + 5555400000000001e0 = 1000000000005110e12
    run(mk(0, 11, 64'd9999999999995555), mk(0, 0, 64'd5555400000000001), 1'b0, 2, r);
    expect_eq(r, mk(0, 12, 64'd1000000000005110), "second rounding");
    // Case 3 subtraction needing recalculation (RTZ):
    // 1000111122223333e11 - 1111222233340000e7: the first attempt gives the
    // 15-digit 999999999999999e11; recalculated with one more digit the exact
    // difference 9999999999999990000e7 is 9999999999999990e10
    run(mk(0, 11, 64'd1000111122223333), mk(0, 7, 64'd1111222233340000), 1'b1, 2, r);
    expect_eq(r, mk(0, 10, 64'd9999999999999990), "recalculation");
    // Case 3 rounding direction depends on EOP (RTA), B = 1.5:
    // 5000000000000004 + 1.5 = ...005.5 -> ...006 (B' = 2)
    run(mk(0, 0, 64'd5000000000000004), mk(0, -15, 64'd1500000000000000), 1'b0, 1, r);
    expect_eq(r, mk(0, 0, 64'd5000000000000006), "case 3 RTA add");
    // 5000000000000004 - 1.5 = ...002.5 -> ...003 (B' = 1)
    run(mk(0, 0, 64'd5000000000000004), mk(0, -15, 64'd1500000000000000), 1'b1, 1, r);
    expect_eq(r, mk(0, 0, 64'd5000000000000003), "case 3 RTA sub");
    // 5000000000000004 - 0.0015 -> ...004 under RTA, ...003 under RTZ
    run(mk(0, 0, 64'd5000000000000004), mk(0, -15, 64'd1500000000000), 1'b1, 1, r);
    expect_eq(r, mk(0, 0, 64'd5000000000000004), "case 3 RTA sub small");
    run(mk(0, 0, 64'd5000000000000004), mk(0, -15, 64'd1500000000000), 1'b1, 2, r);
    expect_eq(r, mk(0, 0, 64'd5000000000000003), "case 3 RTZ sub small");
    // rounding carry: 9999999999999999e1 + 5e0 = 99999999999999995 -> 1e16
    run(mk(0, 1, 64'd9999999999999999), mk(0, 0, 64'd5), 1'b0, 1, r);
    expect_eq(r, mk(0, 2, 64'd1000000000000000), "rounding carry");
    // Case 2 overflow: 9999999999999999 + 2 (RTE) = 1000000000000000e1
    run(mk(0, 0, 64'd9999999999999999), mk(0, 0, 64'd2), 1'b0, 0, r);
    expect_eq(r, mk(0, 1, 64'd1000000000000000), "case 2 round");
    // exact cancellation: +x - +x = +0, and -0 in RTN
    run(mk(0, 3, 64'd12345), mk(0, 3, 64'd12345), 1'b1, 0, r);
    expect_eq(r, mk(0, 3, 64'd0), "x-x RTE");
    run(mk(0, 3, 64'd12345), mk(0, 3, 64'd12345), 1'b1, 3, r);
    expect_eq(r, mk(1, 3, 64'd0), "x-x RTN");
    // zero with a much larger exponent: result is B exactly
    run(mk(0, 300, 64'd0), mk(1, -5, 64'd777), 1'b0, 0, r);
    expect_eq(r, mk(1, -5, 64'd777), "zero operand");
    n_zero++;
    // Case 1: 123e5 + 4e0 = 12300004e0
    run(mk(0, 5, 64'd123), mk(0, 0, 64'd4), 1'b0, 0, r);
    expect_eq(r, mk(0, 0, 64'd12300004), "case 1 exact");

    // --- random ---
    for (int i = 0; i < NRAND; i++) begin
      s1 = 1'($urandom); s2 = 1'($urandom);
      ksel = int'($urandom_range(6));
      case (ksel)
        0, 1:    kk = 0;
        2:       kk = 1 + int'($urandom_range(3));
        3:       kk = 4 + int'($urandom_range(20));
        4:       kk = 16 + int'($urandom_range(8));
        5:       kk = 25 + int'($urandom_range(40));
        default: kk = int'($urandom_range(740));
      endcase
      e1 = 20 + int'($urandom_range(765 - 20 - kk));
      e2 = e1 + kk;
      if ($urandom_range(1) == 1) begin int t = e1; e1 = e2; e2 = t; end
      run(encode(s1, e1, rand_sig()), encode(s2, e2, rand_sig()),
          1'($urandom), int'($urandom_range(4)), r);
    end

    // --- mechanisms seen ---
    $display("case1=%0d case2_bypass=%0d case2_round=%0d case3=%0d round2=%0d recalc=%0d carry=%0d",
             n_case1, n_case2_byp, n_case2_rnd, n_case3, n_round2, n_recalc, n_carry);
    checks++; if (n_case1 == 0)     begin failures++; $display("no Case 1"); end
    checks++; if (n_case2_byp == 0) begin failures++; $display("no Case 2 bypass"); end
    checks++; if (n_case2_rnd == 0) begin failures++; $display("no Case 2 rounding"); end
    checks++; if (n_case3 == 0)     begin failures++; $display("no Case 3"); end
    checks++; if (n_round2 == 0)    begin failures++; $display("no second rounding"); end
    checks++; if (n_recalc == 0)    begin failures++; $display("no recalculation"); end
    checks++; if (n_carry == 0)     begin failures++; $display("no rounding carry"); end
    checks++; if (n_b2b == 0)       begin failures++; $display("no back-to-back request"); end
    checks++; if (n_zero == 0)      begin failures++; $display("no zero operand"); end
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
