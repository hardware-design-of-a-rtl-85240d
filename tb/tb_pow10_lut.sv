// tb_pow10_lut: checks every entry of the power-of-ten table against a
// running product, and that indices beyond 19 return zero.
module tb_pow10_lut;
  logic [4:0] idx;
  logic [63:0] p;
  int checks = 0, failures = 0;

  pow10_lut dut (.idx(idx), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] want = 64'd1;
    for (int i = 0; i < 32; i++) begin
      idx = 5'(i); #1;
      checks++;
      if (p !== ((i < 20) ? want : 64'd0)) begin
        failures++;
        $display("FAIL idx=%0d got=%0d", i, p);
      end
      want = want * 64'd10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
