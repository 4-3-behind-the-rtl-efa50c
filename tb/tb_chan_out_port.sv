// tb_chan_out_port: random I/O writes; checks that wreq rises exactly one
// cycle after a write to address 34 and carries that cycle's output bus.
module tb_chan_out_port;
  int checks = 0, failures = 0;
  logic clk = 0, iowr = 0, wreq, pwr;
  logic [5:0] ioadr = 0, padr;
  logic [31:0] outbus = 0, wdata, pbus;

  chan_out_port #(.ADDR(6'd34)) dut (.clk, .ioadr, .iowr, .outbus, .wreq, .wdata);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      iowr = 1'($urandom);
      ioadr = ($urandom_range(0, 1)) ? 6'd34 : 6'($urandom);
      outbus = $urandom;
      pwr = iowr; padr = ioadr; pbus = outbus;
      @(posedge clk); #1;
      iowr = 0; ioadr = 6'd34;   // next cycle's inputs must not matter yet
      #1;
      checks++;
      if (wreq !== (pwr && padr == 6'd34)) begin failures++; $display("FAIL wreq"); end
      if (pwr && padr == 6'd34) begin
        checks++;
        if (wdata !== pbus) begin failures++; $display("FAIL wdata"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
