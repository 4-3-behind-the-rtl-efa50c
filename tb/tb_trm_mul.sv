// tb_trm_mul: checks the signed product one cycle after the operands are
// applied, and that H takes the high word only on commit.
module tb_trm_mul;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 0, commit = 0;
  logic [31:0] a = 0, b = 0, lo, h;
  logic [63:0] p, hprev;

  trm_mul dut (.clk, .rst, .a, .b, .commit, .lo, .h);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 1;
    hprev = 0;
    for (int n = 0; n < 1000; n++) begin
      a = $urandom; b = $urandom;
      if (n % 5 == 0) a = 32'($urandom_range(0, 100)) - 50;
      p = 64'($signed(a)) * 64'($signed(b));
      commit = 0;
      @(posedge clk); #1;
      if (n % 2 == 1) begin @(posedge clk); #1; end  // H must hold while not committed
      checks++;
      if (lo !== p[31:0]) begin failures++; $display("FAIL lo a=%h b=%h got=%h want=%h", a, b, lo, p[31:0]); end
      checks++;
      if (h !== hprev[31:0]) begin failures++; $display("FAIL h changed without commit"); end
      commit = 1;
      @(posedge clk); #1;
      hprev = {32'b0, p[63:32]};
      checks++;
      if (h !== p[63:32]) begin failures++; $display("FAIL h a=%h b=%h got=%h want=%h", a, b, h, p[63:32]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
