// tb_chan_in_port: checks the data/status mux and that a two-cycle load from
// address 32 produces exactly one read-request pulse, in its second cycle.
module tb_chan_in_port;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 0, iord = 0, rdreq, sel;
  logic [5:0] ioadr = 0;
  logic [31:0] chan_data = 32'hCAFE0001, chan_status = 32'h1, rdata;

  chan_in_port dut (.clk, .rst, .ioadr, .iord, .chan_data, .chan_status, .rdreq, .sel, .rdata);
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got=%h want=%h", what, got, want); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 1;
    for (int n = 0; n < 300; n++) begin
      chan_data = $urandom; chan_status = $urandom;
      ioadr = 6'($urandom);
      if (n % 3 == 0) ioadr = 6'd32;
      if (n % 3 == 1) ioadr = 6'd33;
      #1;
      check("sel", 32'(sel), 32'(ioadr == 32 || ioadr == 33));
      if (ioadr == 32) check("data", rdata, chan_data);
      if (ioadr == 33) check("status", rdata, chan_status);
    end
    // a load of address 32: iord high for two cycles
    for (int n = 0; n < 50; n++) begin
      ioadr = 6'd32; iord = 1;
      @(posedge clk); #1;
      check("rdreq 2nd cycle", 32'(rdreq), 1);
      @(posedge clk); #1;
      check("rdreq once", 32'(rdreq), 0);
      iord = 0; ioadr = 6'($urandom_range(0, 31));
      @(posedge clk); #1;
      check("rdreq idle", 32'(rdreq), 0);
      // status reads never request
      ioadr = 6'd33; iord = 1;
      @(posedge clk); @(posedge clk); #1;
      check("status no rdreq", 32'(rdreq), 0);
      iord = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
