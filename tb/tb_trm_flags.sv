// tb_trm_flags: drives random ALU results for ADD, SUB, ROR and other
// operations and checks N, Z, C, V against the flag rules computed here,
// plus hold when upd is low and the asynchronous reset.
module tb_trm_flags;
  import trm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 0, upd = 0;
  ctrl_t c = '0;
  logic [31:0] a = 0, b = 0, s3 = 0;
  logic [32:0] res = 0;
  flags_t flags, exp;

  trm_flags dut (.clk, .rst, .upd, .ctrl(c), .a, .b, .res, .s3, .flags);
  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (flags !== exp) begin failures++; $display("FAIL %s got=%b want=%b", what, flags, exp); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1; exp = '0; check("reset");
    @(posedge clk); #1 rst = 1;
    for (int n = 0; n < 2000; n++) begin
      int k;
      k = $urandom_range(0, 3);
      c = '0;
      a = $urandom; b = $urandom; s3 = $urandom;
      if (n % 7 == 0) a = b;
      upd = ($urandom_range(0, 4) != 0);
      case (k)
        0: begin c.add = 1; res = 33'(b) + 33'(a); end
        1: begin c.sub = 1; res = 33'(b) + {1'b0, ~a} + 33'd1; end
        2: begin c.ror = 1; res = {1'($urandom), $urandom}; end
        default: begin c.bxor = 1; res = {1'($urandom), b ^ a}; end
      endcase
      if (upd) begin
        exp.n = res[31];
        exp.z = (res[31:0] == 0);
        exp.c = c.ror ? s3[0] : res[32];
        if (c.add)      exp.v = (a[31] == b[31]) && (res[31] != b[31]);
        else if (c.sub) exp.v = (a[31] != b[31]) && (res[31] != b[31]);
        else            exp.v = 0;
      end
      @(posedge clk); #1;
      check($sformatf("k=%0d upd=%0d", k, upd));
    end
    // asynchronous reset, between edges
    #2 rst = 0; #1 exp = '0; check("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
