// tb_par_channel: random writes and reads against a queue model; checks the
// front word, the status bits, dropped writes when full and ignored reads
// when empty. Counts how often full and empty were reached.
module tb_par_channel;
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;
  logic clk = 0, rst = 0, wreq = 0, rdreq = 0;
  logic [31:0] in_data = 0, out_data, status;
  logic [31:0] q [$];

  par_channel #(.Size(32), .DEPTH(16)) dut (.clk, .rst, .wreq, .rdreq, .in_data, .out_data, .status);
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got=%h want=%h", what, got, want); end
  endtask

  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = ((n / 300) % 2 == 0) ? 75 : 25;   // phases that fill and drain
      wreq  = ($urandom_range(0, 99) < bias);
      rdreq = ($urandom_range(0, 99) < 100 - bias);
      in_data = $urandom;
      #1;
      check("status", status, {30'b0, q.size() == 16, q.size() != 0});
      if (q.size() != 0) check("front", out_data, q[0]);
      if (q.size() == 16) n_full++;
      if (q.size() == 0 && rdreq) n_empty_rd++;
      @(posedge clk);
      begin
        bit can_rd, can_wr;
        can_rd = rdreq && q.size() != 0;
        can_wr = wreq && q.size() != 16;
        if (can_rd) void'(q.pop_front());
        if (can_wr) q.push_back(in_data);
      end
      #1;
    end
    checks++;
    if (n_full == 0 || n_empty_rd == 0) begin failures++; $display("FAIL full/empty not reached"); end
    $display("full cycles %0d, reads when empty %0d", n_full, n_empty_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
