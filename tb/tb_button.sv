// tb_button: random pin values appear, zero extended, two clock edges later.
module tb_button;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 0;
  logic [3:0] in_data = 0, h1 = 0, h2 = 0;
  logic [31:0] out_data;

  button #(.W(4)) dut (.clk, .rst, .in_data, .out_data);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 1;
    for (int n = 0; n < 500; n++) begin
      in_data = 4'($urandom);
      @(posedge clk);
      h2 = h1; h1 = in_data;
      #1;
      checks++;
      if (n > 1 && out_data !== {28'b0, h2}) begin failures++; $display("FAIL got=%h want=%h", out_data, h2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
