// tb_mult64_2stage: streams random operand pairs into the two-stage
// multiplier, one per cycle with gaps, and checks every 128-bit product and
// that it appears exactly two cycles after its operands.
module tb_mult64_2stage;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [63:0] a, b;
  logic [127:0] p;
  int checks = 0, failures = 0;
  logic [127:0] want [$];

  mult64_2stage #(.W(64)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                               .a(a), .b(b), .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operands presented in cycle c must come out in cycle c + 2
  logic [1:0]   vpipe;
  logic [127:0] ppipe [2];
  always @(posedge clk) begin
    vpipe    <= {vpipe[0], in_valid};
    ppipe[1] <= ppipe[0];
    ppipe[0] <= 128'(a) * 128'(b);
  end

  always @(negedge clk) if (rst_n) begin
    if (out_valid !== vpipe[1]) begin
      checks++; failures++; $display("valid timing");
    end else if (out_valid) begin
      checks++;
      if (p !== ppipe[1]) begin failures++; $display("FAIL p=%h want=%h", p, ppipe[1]); end
    end
  end

  initial begin
    in_valid = 1'b0; a = '0; b = '0; vpipe = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      a = {$urandom, $urandom};
      b = (i % 7 == 0) ? '1 : {$urandom, $urandom};
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
