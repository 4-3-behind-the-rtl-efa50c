// tb_game_top: end-to-end test of the two-cell network at its default sizes.
//
// The IO cell copies the buttons to the LEDs, then sends the numbers 1..16
// to the Controller in one burst (filling channel 1 to its depth of 16
// while the Controller is still in a delay loop), then receives 16 words,
// showing each on the LEDs and finally their sum. The Controller polls its
// input status, reads each number, squares it in a subroutine (BL, MUL,
// BR) and sends it back. Expected LED values and the sum are computed here
// independently. The test counts each mechanism: load stalls, multiply
// stalls, I/O writes and reads, channel writes and reads, polls that found
// a channel empty, cycles a channel was full, taken conditional branches,
// calls and returns, button reads and LED writes; one that never happens is
// a failure.
module tb_game_top;
  import trm_pkg::*;
  import trm_asm_pkg::*;

  int checks = 0, failures = 0, cycle = 0;
  int n_ld_stall = 0, n_mul_stall = 0, n_ch0_wr = 0, n_ch1_wr = 0, n_ch0_rd = 0, n_ch1_rd = 0;
  int n_empty_poll = 0, n_full = 0, n_bc_taken = 0, n_bl = 0, n_br = 0, n_btn_rd = 0, n_led_wr = 0;
  logic clk = 0, rst = 0, ctrl_pm_we = 0, io_pm_we = 0;
  logic [3:0]  btn = 4'hA;
  logic [7:0]  leds;
  logic [8:0]  pm_wadr = 0;
  logic [35:0] pm_wdat = 0;
  logic [17:0] io_prog [32], ct_prog [32];
  logic [7:0]  exp_led [$];
  int          led_idx = 0, sum = 0;

  game_top dut (.clk, .rst, .btn, .leds, .ctrl_pm_we, .io_pm_we, .pm_wadr, .pm_wdat);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got=%0d want=%0d (cycle %0d)", what, got, want, cycle); end
  endtask

  initial begin
    #400000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst) begin
    cycle <= cycle + 1;
    if ((dut.u_io.stall0 | dut.u_ctrl.stall0) && (dut.u_io.c.ldr | dut.u_ctrl.c.ldr)) n_ld_stall <= n_ld_stall + 1;
    if (dut.u_ctrl.stall0 && dut.u_ctrl.c.mul) n_mul_stall <= n_mul_stall + 1;
    if (dut.ch0_wreq) n_ch0_wr <= n_ch0_wr + 1;
    if (dut.ch1_wreq) n_ch1_wr <= n_ch1_wr + 1;
    if (dut.ch0_rdreq) n_ch0_rd <= n_ch0_rd + 1;
    if (dut.ch1_rdreq) n_ch1_rd <= n_ch1_rd + 1;
    if (dut.i_iord && dut.i_ioadr == 6'd33 && !dut.u_io.stall0 && !dut.ch0_status[0]) n_empty_poll <= n_empty_poll + 1;
    if (dut.c_iord && dut.c_ioadr == 6'd33 && !dut.u_ctrl.stall0 && !dut.ch1_status[0]) n_empty_poll <= n_empty_poll + 1;
    if (dut.ch1_status[1] || dut.ch0_status[1]) n_full <= n_full + 1;
    if (dut.u_ctrl.c.bc && dut.u_ctrl.cond_ok && dut.u_ctrl.c.cond != C_AL) n_bc_taken <= n_bc_taken + 1;
    if (dut.u_ctrl.c.bl) n_bl <= n_bl + 1;
    if (dut.u_ctrl.c.br) n_br <= n_br + 1;
    if (dut.i_iord && dut.i_ioadr == 6'd7 && !dut.u_io.stall0) n_btn_rd <= n_btn_rd + 1;
    if (dut.i_iowr && dut.i_ioadr == 6'd7) begin
      n_led_wr <= n_led_wr + 1;
      if (led_idx < exp_led.size()) check($sformatf("LED write %0d", led_idx), int'(dut.i_outbus[7:0]), int'(exp_led[led_idx]));
      else begin failures++; $display("FAIL extra LED write"); end
      led_idx <= led_idx + 1;
    end
  end

  initial begin
    for (int i = 0; i < 32; i++) begin io_prog[i] = halt(); ct_prog[i] = halt(); end
    // IO cell
    io_prog[0]  = op_i(OP_NOT, 6, 63);       // r6 = I/O base
    io_prog[1]  = ld(0, 6, 7);               // buttons
    io_prog[2]  = st(0, 6, 7);               // LEDs := buttons
    io_prog[3]  = op_i(OP_MOV, 1, 1);
    io_prog[4]  = op_i(OP_MOV, 2, 16);
    io_prog[5]  = st(1, 6, 34);              // send i
    io_prog[6]  = op_i(OP_ADD, 1, 1);
    io_prog[7]  = op_i(OP_SUB, 2, 1);
    io_prog[8]  = bc(C_NE, -4);
    io_prog[9]  = op_i(OP_MOV, 2, 16);
    io_prog[10] = op_i(OP_MOV, 3, 0);
    io_prog[11] = ld(4, 6, 33);              // poll status
    io_prog[12] = op_i(OP_AND, 4, 1);
    io_prog[13] = bc(C_EQ, -3);
    io_prog[14] = ld(5, 6, 32);              // receive
    io_prog[15] = op_r(OP_ADD, 3, 5);
    io_prog[16] = st(5, 6, 7);               // LEDs := square
    io_prog[17] = op_i(OP_SUB, 2, 1);
    io_prog[18] = bc(C_NE, -8);
    io_prog[19] = st(3, 6, 7);               // LEDs := sum
    io_prog[20] = st(3, 7, 10);              // mem[10] := sum
    // Controller cell
    ct_prog[0]  = op_i(OP_NOT, 6, 63);
    ct_prog[1]  = op_i(OP_MOV, 0, 200);      // delay
    ct_prog[2]  = op_i(OP_SUB, 0, 1);
    ct_prog[3]  = bc(C_NE, -2);
    ct_prog[4]  = op_i(OP_MOV, 2, 16);
    ct_prog[5]  = ld(4, 6, 33);              // poll status
    ct_prog[6]  = op_i(OP_AND, 4, 1);
    ct_prog[7]  = bc(C_EQ, -3);
    ct_prog[8]  = ld(5, 6, 32);              // receive
    ct_prog[9]  = bl(4);                     // call square
    ct_prog[10] = st(5, 6, 34);              // send back
    ct_prog[11] = op_i(OP_SUB, 2, 1);
    ct_prog[12] = bc(C_NE, -8);
    ct_prog[14] = op_r(OP_MUL, 5, 5);        // square: r5 := r5 * r5
    ct_prog[15] = br(7);

    exp_led.push_back(8'hA);
    for (int i = 1; i <= 16; i++) begin exp_led.push_back(8'(i * i)); sum += i * i; end
    exp_led.push_back(8'(sum));

    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      pm_wadr = 9'(i);
      io_pm_we = 1; ctrl_pm_we = 0; pm_wdat = {io_prog[2*i+1], io_prog[2*i]};
      @(negedge clk);
      io_pm_we = 0; ctrl_pm_we = 1; pm_wdat = {ct_prog[2*i+1], ct_prog[2*i]};
      @(negedge clk);
    end
    ctrl_pm_we = 0;
    repeat (3) @(negedge clk);
    rst = 1;
    wait (dut.u_io.pc == 10'd21);
    repeat (4) @(posedge clk);
    #1;
    check("IO cell halted", int'(dut.u_io.pc), 21);
    check("Controller halted", int'(dut.u_ctrl.pc), 13);
    check("LED writes", led_idx, exp_led.size());
    check("final LEDs", int'(leds), sum % 256);
    check("sum in IO memory", int'(dut.u_io.u_dm.mem[10]), sum);
    check("channel 0 writes", n_ch0_wr, 16);
    check("channel 1 writes", n_ch1_wr, 16);
    check("channel 0 reads", n_ch0_rd, 16);
    check("channel 1 reads", n_ch1_rd, 16);
    check("calls", n_bl, 16);
    check("returns", n_br, 16);
    check("multiply stalls", n_mul_stall, 16);
    checks++; if (n_ld_stall == 0)   begin failures++; $display("FAIL no load stall"); end
    checks++; if (n_empty_poll == 0) begin failures++; $display("FAIL no empty poll"); end
    checks++; if (n_full == 0)       begin failures++; $display("FAIL channel never full"); end
    checks++; if (n_bc_taken == 0)   begin failures++; $display("FAIL no taken branch"); end
    checks++; if (n_btn_rd == 0)     begin failures++; $display("FAIL no button read"); end
    $display("cycles %0d: load stalls %0d, multiply stalls %0d, empty polls %0d, full cycles %0d, taken branches %0d, calls %0d, button reads %0d, LED writes %0d",
             cycle, n_ld_stall, n_mul_stall, n_empty_poll, n_full, n_bc_taken, n_bl, n_btn_rd, n_led_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
