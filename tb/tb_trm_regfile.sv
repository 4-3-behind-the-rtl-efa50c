// tb_trm_regfile: random writes and reads on both ports against a model
// array; checks that a write lands only at the clock edge and only with we.
module tb_trm_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 0, we = 0;
  logic [2:0] a = 0, dpra = 0;
  logic [31:0] d = 0, b, aa;
  logic [31:0] model [8];

  trm_regfile dut (.clk, .rst, .we, .a, .dpra, .d, .b, .aa);
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got=%h want=%h", what, got, want); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1;
    for (int i = 0; i < 8; i++) begin a = 3'(i); #1 check("reset", b, 0); end
    for (int n = 0; n < 2000; n++) begin
      we = $urandom_range(0, 1); a = 3'($urandom); dpra = 3'($urandom); d = $urandom;
      #1;
      check("B", b, model[a]);
      check("AA", aa, model[dpra]);
      @(posedge clk);
      if (we) model[a] = d;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
