// tb_addsub_abs: checks |a + b| and |a - b| with the sign of the difference
// on random operands, equal operands and operands of very different size.
module tb_addsub_abs;
  logic [63:0] a, b, z;
  logic eop, neg;
  int checks = 0, failures = 0;

  addsub_abs #(.W(64)) dut (.a(a), .b(b), .eop(eop), .z(z), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint signed sa, sb;
    for (int i = 0; i < 10000; i++) begin
      a = {1'b0, $urandom, 31'($urandom)} >> $urandom_range(40);
      b = (i % 10 == 0) ? a : {1'b0, $urandom, 31'($urandom)} >> $urandom_range(40);
      eop = 1'($urandom);
      #1;
      sa = longint'(a); sb = longint'(b);
      checks++;
      if (!eop) begin
        if (z !== a + b || neg) begin failures++; $display("FAIL add"); end
      end else if (sa >= sb) begin
        if (z !== 64'(sa - sb) || neg) begin failures++; $display("FAIL sub+ %0d %0d", sa, sb); end
      end else begin
        if (z !== 64'(sb - sa) || !neg) begin failures++; $display("FAIL sub- %0d %0d", sa, sb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
