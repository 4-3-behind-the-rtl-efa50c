// tb_trm_decoder: decodes every 18-bit instruction and compares each strobe
// and field with the opcode table written out independently here.
module tb_trm_decoder;
  import trm_pkg::*;
  int checks = 0, failures = 0;
  logic [17:0] ir;
  ctrl_t c, e;

  trm_decoder dut (.ir, .ctrl(c));

  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 18); i += 3) begin
      ir = 18'(i);
      e = '0;
      e.is_reg = ir[10];
      e.ird = ir[13:11];
      e.irs = ir[2:0];
      e.cond = ir[13:10];
      e.vector = (ir[10:7] == 4'b1100);
      case (ir[17:14])
        4'd0:  e.mov = 1;
        4'd1:  e.inv = 1;
        4'd2:  e.add = 1;
        4'd3:  e.sub = 1;
        4'd4:  e.band = 1;
        4'd5:  e.bic = 1;
        4'd6:  e.bor = 1;
        4'd7:  e.bxor = 1;
        4'd8:  e.mul = !(ir[10] && ir[9]);
        4'd10: e.ror = 1;
        4'd11: begin e.br = ir[10] && !ir[9]; e.blr = ir[10] && ir[9]; end
        4'd12: e.ldr = 1;
        4'd13: e.st = 1;
        4'd14: e.bc = 1;
        4'd15: e.bl = 1;
        default: ;
      endcase
      e.ldh = (ir[17:14] == 0) && ir[10] && ir[3];
      e.dst = (ir[17:14] == 15) ? 3'd7 : ir[13:11];
      #1;
      checks++;
      if (c !== e) begin
        failures++;
        if (failures < 10) $display("FAIL ir=%h got=%h want=%h", ir, c, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
