// tb_bid_rounder: checks the four-stage rounder.
//
// A random stream of ROUND and MUL operations (one per cycle, with gaps) is
// issued. Each ROUND result is compared with a reference built from plain
// division and remainder: q = x / 10^d, the fraction r / 10^d compared with
// one half through 2r versus 10^d, the increment chosen by rounding mode and
// by the Case 3 table (addition and subtraction columns) when override is set,
// the first-pass sticky bit folded in on a second pass, and 10^16 turned into
// 10^15 with carry. ROUND results must appear four cycles after issue and MUL
// products two cycles after issue.
module tb_bid_rounder;
  import bid_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, is_mul, sign, ovr, sub, a_odd, rnd2, prev;
  logic [63:0] x, y;
  logic [4:0] d;
  rnd_mode_e mode;
  logic mul_valid, out_valid, inc, inexact, carry;
  logic [63:0] mul_p, q, z;
  int checks = 0, failures = 0;

  bid_rounder #(.PREC(16)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .is_mul(is_mul), .x(x), .y(y),
    .d(d), .mode(mode), .sign(sign), .override_active_in(ovr), .sub_rnd_mode(sub),
    .a_odd_even(a_odd), .rnd2_active(rnd2), .rnd2_active_prev_dir(prev),
    .mul_valid(mul_valid), .mul_p(mul_p), .out_valid(out_valid), .q(q), .z(z),
    .inc(inc), .inexact(inexact), .carry(carry)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic        v, m;
    logic [63:0] q, z, p;
    logic        inc, nz, carry;
  } exp_s;

  exp_s pipe [5];   // pipe[i]: expected outputs of the operation issued i cycles ago

  function automatic exp_s model(input logic vv, input logic mm, input logic [63:0] xx,
                                 input logic [63:0] yy, input int dd, input rnd_mode_e md,
                                 input logic sg, input logic ov, input logic sb,
                                 input logic ao, input logic r2, input logic pv);
    exp_s e;
    logic [127:0] pw, qq, rr;
    logic gt, eq, nz, odd, up;
    e.v = vv; e.m = mm; e.p = 64'(128'(xx) * 128'(yy));
    pw = 128'd1;
    for (int i = 0; i < dd; i++) pw = pw * 128'd10;
    qq = 128'(xx) / pw;
    rr = 128'(xx) % pw;
    nz = (rr != 0) || (r2 && pv);
    gt = (2 * rr > pw) || (2 * rr == pw && r2 && pv);
    eq = (2 * rr == pw) && !(r2 && pv);
    odd = qq[0] ^ (ov && ao);
    if (ov && sb) begin
      case (md)
        RTZ: up = nz;
        RTA: up = gt;
        RTE: up = gt || (eq && odd);
        RTP: up = sg && nz;
        default: up = !sg && nz;
      endcase
    end else begin
      case (md)
        RTZ: up = 1'b0;
        RTA: up = gt || eq;
        RTE: up = gt || (eq && odd);
        RTP: up = !sg && nz;
        default: up = sg && nz;
      endcase
    end
    e.q = 64'(qq);
    e.z = 64'(qq) + 64'(up);
    e.inc = up;
    e.nz = nz;
    e.carry = (e.z == 64'd10000000000000000);
    if (e.carry) e.z = 64'd1000000000000000;
    return e;
  endfunction

  always @(posedge clk) begin
    pipe[4] <= pipe[3];
    pipe[3] <= pipe[2];
    pipe[2] <= pipe[1];
    pipe[1] <= pipe[0];
  end

  always_comb pipe[0] = model(in_valid, is_mul, x, y, int'(d), mode, sign, ovr, sub,
                              a_odd, rnd2, prev);

  always @(negedge clk) if (rst_n) begin
    // multiplies: two cycles
    checks++;
    if (mul_valid !== (pipe[2].v && pipe[2].m)) begin
      failures++; $display("mul_valid timing");
    end else if (mul_valid && mul_p !== pipe[2].p) begin
      failures++; $display("FAIL mul %h want %h", mul_p, pipe[2].p);
    end
    // roundings: four cycles
    checks++;
    if (out_valid !== (pipe[4].v && !pipe[4].m)) begin
      failures++; $display("out_valid timing");
    end else if (out_valid && (q !== pipe[4].q || z !== pipe[4].z || inc !== pipe[4].inc ||
                               inexact !== pipe[4].nz || carry !== pipe[4].carry)) begin
      failures++;
      $display("FAIL q=%0d z=%0d inc=%b nz=%b c=%b want q=%0d z=%0d inc=%b nz=%b c=%b",
               q, z, inc, inexact, carry, pipe[4].q, pipe[4].z, pipe[4].inc, pipe[4].nz,
               pipe[4].carry);
    end
  end

  initial begin
    logic [63:0] pw;
    int dd;
    in_valid = 1'b0; is_mul = 1'b0; x = '0; y = '0; d = '0; mode = RTE;
    sign = 1'b0; ovr = 1'b0; sub = 1'b0; a_odd = 1'b0; rnd2 = 1'b0; prev = 1'b0;
    for (int i = 0; i < 5; i++) pipe[i] = model(1'b0, 1'b0, 0, 0, 0, RTE, 0, 0, 0, 0, 0, 0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      is_mul   = ($urandom_range(4) == 0);
      dd       = int'($urandom_range(19));
      d        = 5'(dd);
      pw = 64'd1;
      for (int j = 0; j < dd; j++) pw = pw * 64'd10;
      case ($urandom_range(5))
        0: x = pw * 64'($urandom_range(9999)) + pw / 2;            // exact half
        1: x = pw * 64'($urandom_range(9999));                     // exact
        2: x = 64'd99999999999999995 + 64'($urandom_range(4));     // near 10^16 * 10
        default: x = {$urandom, $urandom};
      endcase
      if (i % 50 == 0) begin x = 64'd99999999999999995; d = 5'd1; end
      y        = {$urandom, $urandom} >> $urandom_range(63);
      mode     = rnd_mode_e'($urandom_range(4));
      sign     = 1'($urandom);
      ovr      = 1'($urandom);
      sub      = 1'($urandom);
      a_odd    = 1'($urandom);
      rnd2     = ($urandom_range(3) == 0);
      prev     = 1'($urandom);
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (6) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
