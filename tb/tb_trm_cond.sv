// tb_trm_cond: every condition code of the conditional branch, on the core.
//
// For each of 8 flag set-ups (ADD or SUB results that are zero, negative,
// carry, signed overflow, ...) and each of the 16 conditions, the program
// clears r2, sets the flags, executes "Bc cond, +1" over "MOV r2, #1" and
// stores r2 at an absolute address. A taken branch leaves 0, a fall-through
// 1. The expected flags and branch outcomes are computed here from the
// operand values.
module tb_trm_cond;
  import trm_pkg::*;
  import trm_asm_pkg::*;

  int checks = 0, failures = 0, pc_end;
  logic clk = 0, rst = 0;
  logic [31:0] inbus = 0, outbus;
  logic [5:0]  ioadr;
  logic iowr, iord, pm_we = 0;
  logic [8:0]  pm_wadr = 0;
  logic [35:0] pm_wdat = 0;
  logic [17:0] prog [1024];
  logic [31:0] sb [8], sa [8];
  bit          s_add [8];

  trm dut (.clk, .rst, .inbus, .ioadr, .iowr, .iord, .outbus, .pm_we, .pm_wadr, .pm_wdat);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit taken(int c, bit n, bit z, bit cy, bit v);
    case (c)
      0: return z;          1: return !z;
      2: return cy;         3: return !cy;
      4: return n;          5: return !n;
      6: return v;          7: return !v;
      8: return cy && !z;   9: return !cy || z;
      10: return n == v;    11: return n != v;
      12: return !z && n == v; 13: return z || n != v;
      14: return 1;         default: return 0;
    endcase
  endfunction

  initial begin
    int p;
    p = 0;
    // operands (B, A) and operation of the flag-setting instruction
    sb[0] = 5;            sa[0] = 5;            s_add[0] = 0;
    sb[1] = 3;            sa[1] = 5;            s_add[1] = 0;
    sb[2] = 7;            sa[2] = 5;            s_add[2] = 0;
    sb[3] = 32'h8000_0000; sa[3] = 1;           s_add[3] = 0;
    sb[4] = 32'h8000_0000; sa[4] = 32'h8000_0000; s_add[4] = 1;
    sb[5] = 32'hFFFF_FFFF; sa[5] = 1;           s_add[5] = 1;
    sb[6] = 0;            sa[6] = 1;            s_add[6] = 0;
    sb[7] = 32'h7FFF_FFFF; sa[7] = 1;           s_add[7] = 1;
    for (int s = 0; s < 8; s++)
      for (int c = 0; c < 16; c++) begin
        prog[p++] = op_i(OP_MOV, 2, 0);
        case (s)
          0: begin prog[p++] = op_i(OP_MOV, 0, 5); prog[p++] = op_i(OP_SUB, 0, 5); end
          1: begin prog[p++] = op_i(OP_MOV, 0, 3); prog[p++] = op_i(OP_SUB, 0, 5); end
          2: begin prog[p++] = op_i(OP_MOV, 0, 7); prog[p++] = op_i(OP_SUB, 0, 5); end
          3: begin prog[p++] = op_i(OP_MOV, 0, 1); prog[p++] = op_i(OP_ROR, 0, 1); prog[p++] = op_i(OP_SUB, 0, 1); end
          4: begin prog[p++] = op_i(OP_MOV, 0, 1); prog[p++] = op_i(OP_ROR, 0, 1); prog[p++] = op_r(OP_ADD, 0, 0); end
          5: begin prog[p++] = op_i(OP_NOT, 0, 0); prog[p++] = op_i(OP_ADD, 0, 1); end
          6: begin prog[p++] = op_i(OP_MOV, 0, 0); prog[p++] = op_i(OP_SUB, 0, 1); end
          default: begin prog[p++] = op_i(OP_MOV, 0, 1); prog[p++] = op_i(OP_ROR, 0, 1);
                         prog[p++] = op_r(OP_NOT, 0, 0); prog[p++] = op_i(OP_ADD, 0, 1); end
        endcase
        prog[p++] = bc(cond_e'(c), 1);
        prog[p++] = op_i(OP_MOV, 2, 1);
        prog[p++] = st(2, 7, s * 16 + c);
      end
    pc_end = p;
    prog[p++] = halt();
    if (p % 2) prog[p++] = halt();

    @(negedge clk);
    for (int i = 0; i < p / 2; i++) begin
      pm_we = 1; pm_wadr = 9'(i); pm_wdat = {prog[2*i+1], prog[2*i]};
      @(negedge clk);
    end
    pm_we = 0;
    @(negedge clk) rst = 1;
    wait (dut.pc == 10'(pc_end));
    repeat (3) @(posedge clk);
    #1;
    for (int s = 0; s < 8; s++) begin
      logic [32:0] r;
      bit n, z, cy, v;
      r  = s_add[s] ? 33'(sb[s]) + 33'(sa[s]) : 33'(sb[s]) + {1'b0, ~sa[s]} + 33'd1;
      n  = r[31]; z = (r[31:0] == 0); cy = r[32];
      v  = s_add[s] ? (sb[s][31] == sa[s][31] && r[31] != sb[s][31])
                    : (sb[s][31] != sa[s][31] && r[31] != sb[s][31]);
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (dut.u_dm.mem[s * 16 + c] !== (taken(c, n, z, cy, v) ? 0 : 1)) begin
          failures++;
          $display("FAIL setup %0d (NZCV=%b%b%b%b) cond %0d: r2=%0d", s, n, z, cy, v, c, dut.u_dm.mem[s * 16 + c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
