// tb_bid_pack: checks the decimal64 BID encoder against the testbench's own
// encoder for random signs, exponents and canonical significands, including
// both sides of the 2^53 boundary between the two encodings.
module tb_bid_pack;
  import bid_pkg::*;
  import bid_ref_pkg::*;

  dfp_t d;
  logic [63:0] w;
  int checks = 0, failures = 0;

  bid_pack dut (.d(d), .w(w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic s, input int e, input logic [63:0] c);
    d.sign = s; d.exp = 10'(e); d.sig = sig_t'(c);
    #1;
    checks++;
    if (w !== encode(s, e, c)) begin
      failures++;
      $display("FAIL s=%b e=%0d c=%0d got=%h want=%h", s, e, c, w, encode(s, e, c));
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++)
      one(1'($urandom), int'($urandom_range(767)),
          {$urandom, $urandom} % ((i % 2) ? 64'd10000000000000000 : 64'h20_0000_0000_0000));
    one(1'b0, 398, 64'h1F_FFFF_FFFF_FFFF);
    one(1'b1, 398, 64'h20_0000_0000_0000);
    one(1'b0, 767, 64'd9999999999999999);
    one(1'b1, 0, 64'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
