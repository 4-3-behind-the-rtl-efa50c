// tb_led: random bus cycles; the LED register loads only on a write to
// address 7 and keeps its value otherwise.
module tb_led;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 0, iowr = 0;
  logic [7:0] in_data = 0, out_data, want = 0;
  logic [5:0] ioadr = 0;

  led #(.ADDR(6'd7)) dut (.clk, .rst, .in_data, .ioadr, .iowr, .out_data);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (out_data !== 0) failures++;
    rst = 1;
    for (int n = 0; n < 1000; n++) begin
      iowr = 1'($urandom); in_data = 8'($urandom);
      ioadr = ($urandom_range(0, 2) == 0) ? 6'd7 : 6'($urandom);
      @(posedge clk);
      if (iowr && ioadr == 7) want = in_data;
      #1;
      checks++;
      if (out_data !== want) begin failures++; $display("FAIL got=%h want=%h", out_data, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
