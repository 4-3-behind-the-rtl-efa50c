// trm_decoder: control path of the TRM.
//
// Purely combinational. Splits the 18-bit instruction into its register
// fields and one-hot operation strobes, exactly along the document's control
// path: op = IR[17:14]; MUL is op 8 except in its vector form (IR[10] and
// IR[9] both set); BR and BLR share op 11 and are told apart by IR[9]; LDH is
// a register-form MOV with IR[3] set; the destination is forced to the link
// register r7 for BL. The `vector` strobe marks the vector-extension pattern
// IR[10:7] = 1100; this design decodes it only to suppress the register write
// (the vector unit itself is not part of this RTL). The condition field
// position IR[13:10] is this design's choice.
module trm_decoder
  import trm_pkg::*;
(
  input  logic [IW-1:0] ir,
  output ctrl_t         ctrl
);
  logic [3:0] op;

  always_comb begin
    op          = ir[17:14];
    ctrl        = '0;
    ctrl.vector = ir[10] & ir[9] & ~ir[8] & ~ir[7];
    ctrl.is_reg = ir[10];
    ctrl.ird    = ir[13:11];
    ctrl.irs    = ir[2:0];
    ctrl.cond   = ir[13:10];
    ctrl.mov    = (op == OP_MOV);
    ctrl.inv    = (op == OP_NOT);
    ctrl.add    = (op == OP_ADD);
    ctrl.sub    = (op == OP_SUB);
    ctrl.band   = (op == OP_AND);
    ctrl.bic    = (op == OP_BIC);
    ctrl.bor    = (op == OP_OR);
    ctrl.bxor   = (op == OP_XOR);
    ctrl.mul    = (op == OP_MUL) & (~ir[10] | ~ir[9]);
    ctrl.ror    = (op == OP_ROR);
    ctrl.br     = (op == OP_BR) & ir[10] & ~ir[9];
    ctrl.blr    = (op == OP_BR) & ir[10] & ir[9];
    ctrl.ldr    = (op == OP_LD);
    ctrl.st     = (op == OP_ST);
    ctrl.bc     = (op == OP_BC);
    ctrl.bl     = (op == OP_BL);
    ctrl.ldh    = ctrl.mov & ir[10] & ir[3];
    ctrl.dst    = ctrl.bl ? LR : ir[13:11];
  end
endmodule
