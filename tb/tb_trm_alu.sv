// tb_trm_alu: checks every ALU function and the rotator against values
// computed here from random operands and a few corner cases.
module tb_trm_alu;
  import trm_pkg::*;
  int checks = 0, failures = 0;
  ctrl_t c;
  logic [31:0] a, b, s3, exp_s3;
  logic [32:0] res, exp;

  trm_alu dut (.ctrl(c), .a, .b, .res, .s3);

  task automatic check(string what, logic [32:0] got, logic [32:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%h b=%h got=%h want=%h", what, a, b, got, want);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = (i < 8) ? {32{i[0]}} : $urandom;
      b = (i < 8) ? {32{i[1]}} : $urandom;
      if (i == 8) begin a = 32'h7fffffff; b = 32'h1; end
      for (int op = 0; op < 8; op++) begin
        c = '0;
        case (op)
          0: begin c.mov  = 1; exp = {1'b0, a}; end
          1: begin c.inv  = 1; exp = {1'b0, ~a}; end
          2: begin c.add  = 1; exp = 33'(b) + 33'(a); end
          3: begin c.sub  = 1; exp = 33'(b) + {1'b0, ~a} + 33'd1; end
          4: begin c.band = 1; exp = {1'b0, b & a}; end
          5: begin c.bic  = 1; exp = {1'b0, b & ~a}; end
          6: begin c.bor  = 1; exp = {1'b0, b | a}; end
          default: begin c.bxor = 1; exp = {1'b0, b ^ a}; end
        endcase
        #1 check($sformatf("op%0d", op), res, exp);
      end
      // rotate
      exp_s3 = b;
      for (int k = 0; k < int'(a[4:0]); k++) exp_s3 = {exp_s3[0], exp_s3[31:1]};
      c = '0; c.ror = 1;
      #1 check("ror", {1'b0, s3}, {1'b0, exp_s3});
      // subtraction result as a difference
      c = '0; c.sub = 1;
      #1 check("sub-diff", {1'b0, res[31:0]}, {1'b0, b - a});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
