// tb_digit_counter: checks the decimal digit counter against a count made by
// repeated comparison with powers of ten, on every power of ten and its
// neighbours, on every power of two and its neighbours, and on random values
// of every bit length up to 64.
module tb_digit_counter;
  logic [63:0] x;
  logic [4:0] digits;
  int checks = 0, failures = 0;

  digit_counter #(.W(64)) dut (.x(x), .digits(digits));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_digits(input logic [63:0] v);
    int n = 1;
    logic [64:0] p = 65'd10;
    while (65'(v) >= p) begin n++; p = p * 65'd10; end
    return n;
  endfunction

  task automatic one(input logic [63:0] v);
    x = v; #1;
    checks++;
    if (int'(digits) != ref_digits(v)) begin
      failures++;
      $display("FAIL x=%0d got=%0d want=%0d", v, digits, ref_digits(v));
    end
  endtask

  initial begin
    logic [63:0] p = 64'd1;
    one(64'd0);
    for (int i = 0; i < 20; i++) begin
      one(p); one(p - 64'd1); one(p + 64'd1);
      if (i < 19) p = p * 64'd10;
    end
    for (int m = 0; m < 64; m++) begin
      one(64'd1 << m); one((64'd1 << m) - 64'd1); one((64'd1 << m) + 64'd1);
    end
    one('1);
    for (int i = 0; i < 20000; i++)
      one({$urandom, $urandom} >> $urandom_range(63));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
