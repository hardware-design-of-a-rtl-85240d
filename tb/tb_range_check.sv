// tb_range_check: checks the two range flags at and around 10^15 and 10^16
// and on random values.
module tb_range_check;
  logic [63:0] z;
  logic ge_hi, lt_lo;
  int checks = 0, failures = 0;

  range_check #(.PREC(16)) dut (.z(z), .ge_hi(ge_hi), .lt_lo(lt_lo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [63:0] v);
    z = v; #1;
    checks++;
    if (ge_hi !== (v >= 64'd10000000000000000) || lt_lo !== (v < 64'd1000000000000000)) begin
      failures++;
      $display("FAIL z=%0d ge=%b lt=%b", v, ge_hi, lt_lo);
    end
  endtask

  initial begin
    for (int dlt = -2; dlt <= 2; dlt++) begin
      one(64'(64'd1000000000000000 + 64'(dlt)));
      one(64'(64'd10000000000000000 + 64'(dlt)));
    end
    one(0); one('1);
    for (int i = 0; i < 5000; i++) one({$urandom, $urandom} >> $urandom_range(12, 14));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
