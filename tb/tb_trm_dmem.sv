// tb_trm_dmem: random writes and clocked reads against a model array,
// including read-during-write (the old word is returned).
module tb_trm_dmem;
  int checks = 0, failures = 0;
  logic clk = 0, wr_en = 0;
  logic [10:0] adr = 0;
  logic [31:0] wr_dat = 0, rd_dat, want;
  logic [31:0] model [2048];

  trm_dmem #(.BN(4)) dut (.clk, .adr, .wr_en, .wr_dat, .rd_dat);
  always #5 clk = ~clk;

  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) model[i] = 0;
    for (int n = 0; n < 4000; n++) begin
      wr_en = (n < 1500) ? 1'b1 : 1'($urandom);
      adr = (n < 1500) ? 11'(n) : 11'($urandom_range(0, 1535));
      wr_dat = $urandom;
      want = model[adr];
      @(posedge clk);
      if (wr_en) model[adr] = wr_dat;
      #1;
      checks++;
      if (rd_dat !== want) begin failures++; $display("FAIL adr=%0d got=%h want=%h", adr, rd_dat, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
