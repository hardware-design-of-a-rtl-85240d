// tb_bid_unpack: checks the decimal64 BID decoder on random canonical words
// of both encodings, on non-canonical significands (read as zero) and on the
// infinity/NaN flag. Expected fields come from the testbench's own encoder.
module tb_bid_unpack;
  import bid_pkg::*;
  import bid_ref_pkg::*;

  logic [63:0] w;
  dfp_t d;
  logic special;
  int checks = 0, failures = 0;

  bid_unpack dut (.w(w), .d(d), .special(special));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s;
    int e;
    logic [63:0] c;
    for (int i = 0; i < 5000; i++) begin
      s = 1'($urandom);
      e = int'($urandom_range(767));
      c = {$urandom, $urandom} % 64'd10000000000000000;
      if (i % 3 == 0) c = c % 64'h20_0000_0000_0000;   // short form
      w = encode(s, e, c);
      #1;
      checks++;
      if (d.sign !== s || d.exp !== 10'(e) || d.sig !== sig_t'(c) || special) begin
        failures++;
        $display("FAIL w=%h got %b %0d %0d", w, d.sign, d.exp, d.sig);
      end
    end
    // non-canonical: 10^16 .. 2^54-1 read as zero
    w = {1'b0, 2'b11, 10'd100, 51'h7_FFFF_FFFF_FFFF}; #1;
    checks++; if (d.sig !== '0 || d.exp !== 10'd100) begin failures++; $display("noncanonical"); end
    w = encode(1'b0, 5, 64'd10000000000000000); #1;
    checks++; if (d.sig !== '0) begin failures++; $display("10^16 not zeroed"); end
    w = encode(1'b0, 5, 64'd9999999999999999); #1;
    checks++; if (d.sig !== sig_t'(64'd9999999999999999)) begin failures++; $display("max sig"); end
    // infinity and NaN
    w = 64'h7800_0000_0000_0000; #1;
    checks++; if (!special) begin failures++; $display("inf not flagged"); end
    w = 64'h7C00_0000_0000_0000; #1;
    checks++; if (!special) begin failures++; $display("nan not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
