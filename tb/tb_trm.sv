// tb_trm: runs a test program on the TRM core and compares every register
// write, in order, with the trace worked out by hand for that program. The
// program covers a counted loop (SUB sets flags, Bc NE loops back), store
// and load to data memory, both multiply stalls with LDH, ROR, BL with a
// BR return, BLR, absolute addressing through r7, and one I/O store and one
// I/O load. It also checks the I/O bus cycles, data memory contents and the
// total cycle count: 38 instructions + 5 stall cycles = 43 cycles to reach
// the final halt.
module tb_trm;
  import trm_pkg::*;
  import trm_asm_pkg::*;

  int checks = 0, failures = 0, cycle = 0, halt_cycle = -1, widx = 0, n_iowr = 0, n_iord = 0;
  logic clk = 0, rst = 0;
  logic [31:0] inbus, outbus;
  logic [5:0]  ioadr;
  logic iowr, iord, pm_we = 0;
  logic [8:0]  pm_wadr = 0;
  logic [35:0] pm_wdat = 0;
  logic [17:0] prog [32];
  int          exp_reg [$];
  logic [31:0] exp_val [$];

  trm #(.IMB(1), .DMB(4)) dut (.clk, .rst, .inbus, .ioadr, .iowr, .iord, .outbus,
                               .pm_we, .pm_wadr, .pm_wdat);
  always #5 clk = ~clk;
  assign inbus = 32'hA500_0000 | 32'(ioadr);

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got=%h want=%h (cycle %0d)", what, got, want, cycle); end
  endtask

  task automatic w(int r, logic [31:0] v); exp_reg.push_back(r); exp_val.push_back(v); endtask

  initial begin
    #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // trace monitor
  always @(posedge clk) if (rst) begin
    cycle <= cycle + 1;
    if ($test$plusargs("trace")) $display("cyc %0d pc %0d stall %b", cycle, dut.pc, dut.stall0);
    if (dut.pc == 10'd28 && halt_cycle < 0) halt_cycle <= cycle;
    if (dut.regwr) begin
      if (widx < exp_reg.size()) begin
        check($sformatf("write %0d reg", widx), 32'(dut.c.dst), 32'(exp_reg[widx]));
        check($sformatf("write %0d val", widx), dut.regmux, exp_val[widx]);
      end else begin
        failures++; $display("FAIL unexpected write r%0d=%h", dut.c.dst, dut.regmux);
      end
      widx <= widx + 1;
    end
    if (iowr) begin
      n_iowr <= n_iowr + 1;
      check("iowr adr", 32'(ioadr), 34);
      check("iowr data", outbus, 16);
    end
    if (iord) begin
      n_iord <= n_iord + 1;
      check("iord adr", 32'(ioadr), 33);
    end
  end

  // writes during reset are forbidden
  always @(posedge clk) if (!rst && (dut.regwr || iowr || dut.dmwe)) begin
    failures++; $display("FAIL write while in reset");
  end

  initial begin
    for (int i = 0; i < 32; i++) prog[i] = halt();
    prog[0]  = op_i(OP_MOV, 0, 5);
    prog[1]  = op_i(OP_MOV, 1, 0);
    prog[2]  = op_r(OP_ADD, 1, 0);
    prog[3]  = op_i(OP_SUB, 0, 1);
    prog[4]  = bc(C_NE, -3);
    prog[5]  = op_i(OP_MOV, 2, 100);
    prog[6]  = st(1, 2, 3);
    prog[7]  = ld(3, 2, 3);
    prog[8]  = op_i(OP_MOV, 4, 1000);
    prog[9]  = op_r(OP_MUL, 4, 3);
    prog[10] = op_i(OP_MOV, 5, 1023);
    prog[11] = op_i(OP_ROR, 5, 10);
    prog[12] = op_r(OP_MUL, 5, 5);
    prog[13] = ldh(6);
    prog[14] = bl(2);
    prog[15] = op_i(OP_MOV, 0, 77);
    prog[16] = bc(C_AL, 3);
    prog[17] = op_i(OP_ADD, 1, 1);
    prog[18] = br(7);
    prog[20] = op_i(OP_NOT, 2, 63);
    prog[21] = st(1, 2, 34);
    prog[22] = ld(3, 2, 33);
    prog[23] = op_i(OP_MOV, 4, 26);
    prog[24] = blr(6, 4);
    prog[26] = st(0, 7, 5);
    prog[27] = ld(2, 7, 5);
    // expected register writes
    w(0, 5); w(1, 0);
    w(1, 5); w(0, 4); w(1, 9); w(0, 3); w(1, 12); w(0, 2); w(1, 14); w(0, 1); w(1, 15); w(0, 0);
    w(2, 100); w(3, 15); w(4, 1000); w(4, 15000); w(5, 1023); w(5, 32'hFFC0_0000);
    w(5, 0); w(6, 32'h1000); w(7, 15); w(1, 16); w(0, 77);
    w(2, 32'hFFFF_FFC0); w(3, 32'hA500_0021); w(4, 26); w(6, 25); w(2, 77);

    // load the program while in reset
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      pm_we = 1; pm_wadr = 9'(i); pm_wdat = {prog[2*i+1], prog[2*i]};
      @(negedge clk);
    end
    pm_we = 0;
    repeat (2) @(negedge clk);
    rst = 1;
    wait (halt_cycle >= 0);
    check("cycles to halt", halt_cycle, 43);
    repeat (5) @(posedge clk);
    #1;
    check("pc halted", 32'(dut.pc), 28);
    check("writes", widx, exp_reg.size());
    check("io writes", n_iowr, 1);
    check("io read cycles", n_iord, 2);
    check("mem[103]", dut.u_dm.mem[103], 15);
    check("mem[5]", dut.u_dm.mem[5], 77);
    check("flag Z after loop", 32'(dut.flags.z), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
