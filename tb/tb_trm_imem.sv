// tb_trm_imem: writes random words, then reads them back and checks that the
// word read at address X appears exactly one clock edge after X is applied.
module tb_trm_imem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [8:0] adr = 0, wadr = 0;
  logic [35:0] dout, din = 0;
  logic [35:0] model [512];

  trm_imem #(.BN(1)) dut (.clk, .adr, .dout, .we, .wadr, .din);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) model[i] = 0;
    // unwritten memory reads as zero
    adr = 9'd77; @(posedge clk); #1;
    checks++; if (dout !== 0) begin failures++; $display("FAIL init"); end
    for (int n = 0; n < 600; n++) begin
      we = 1; wadr = 9'($urandom); din = {$urandom, 4'($urandom)};
      model[wadr] = din;
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 600; n++) begin
      adr = 9'($urandom);
      #1;
      @(posedge clk); #1;
      checks++;
      if (dout !== model[adr]) begin failures++; $display("FAIL adr=%0d got=%h want=%h", adr, dout, model[adr]); end
      // the output does not follow the address before the next edge
      adr = adr + 9'd1; #1;
      checks++;
      if (dout !== model[adr - 9'd1]) begin failures++; $display("FAIL not registered"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
