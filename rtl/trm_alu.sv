// trm_alu: arithmetic-logic unit and rotator of the TRM.
//
// Combinational. res is 33 bits wide: bit 32 is the carry out of ADD and SUB
// and feeds the C flag. Operand B is the register addressed by rd, operand A
// is register rs or the zero-extended immediate. Functions (document's table):
//   MOV B:=A, NOT B:=~A, ADD B:=B+A, SUB B:=B-A, AND B:=B&A, BIC B:=B&~A,
//   OR B:=B|A, XOR B:=B^A; any other operation yields ~A, as in the document.
// SUB adds the 33-bit two's complement of {0,A}, so C is set when no borrow
// occurs. s3 is the rotate result used by ROR: B rotated right by A[4:0]
// (the operand roles and amount width of ROR are this design's choice).
module trm_alu
  import trm_pkg::*;
(
  input  ctrl_t          ctrl,
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  output logic [DW:0]    res,
  output logic [DW-1:0]  s3
);
  logic [DW:0] minus_a;

  always_comb begin
    minus_a = {1'b0, ~a} + 33'd1;
    if      (ctrl.mov)  res = {1'b0, a};
    else if (ctrl.add)  res = {1'b0, b} + {1'b0, a};
    else if (ctrl.sub)  res = {1'b0, b} + minus_a;
    else if (ctrl.band) res = {1'b0, b & a};
    else if (ctrl.bic)  res = {1'b0, b & ~a};
    else if (ctrl.bor)  res = {1'b0, b | a};
    else if (ctrl.bxor) res = {1'b0, b ^ a};
    else                res = {1'b0, ~a};
    s3 = (b >> a[4:0]) | (b << (6'd32 - {1'b0, a[4:0]}));
  end
endmodule
