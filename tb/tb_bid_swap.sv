// tb_bid_swap: checks Step 1 (exponent compare, swap, effective operation)
// on random operand pairs, including equal exponents: AN must carry the larger
// exponent, B's sign enters with the operation folded in, and
// EOP = op ^ a.sign ^ b.sign, K = |a.exp - b.exp|.
module tb_bid_swap;
  import bid_pkg::*;

  dfp_t a, b, an, bn;
  logic op, eop, swapped;
  exp_t k;
  int checks = 0, failures = 0;

  bid_swap dut (.a(a), .b(b), .op(op), .an(an), .bn(bn), .eop(eop), .k(k),
                .swapped(swapped));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    dfp_t hi, lo, beff;
    for (int i = 0; i < 5000; i++) begin
      ea = int'($urandom_range(767));
      eb = (i % 4 == 0) ? ea : int'($urandom_range(767));
      a = {1'($urandom), 10'(ea), 54'({$urandom, $urandom})};
      b = {1'($urandom), 10'(eb), 54'({$urandom, $urandom})};
      op = 1'($urandom);
      #1;
      beff = b; beff.sign = b.sign ^ op;
      if (ea >= eb) begin hi = a; lo = beff; end
      else          begin hi = beff; lo = a; end
      checks++;
      if (an !== hi || bn !== lo || eop !== (op ^ a.sign ^ b.sign) ||
          k !== 10'((ea >= eb) ? ea - eb : eb - ea) || swapped !== (ea < eb)) begin
        failures++;
        $display("FAIL ea=%0d eb=%0d op=%b", ea, eb, op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
