// trm_flags: the TRM's condition flags N, Z, C and V.
//
// Flags are updated at the rising clock edge of every cycle that writes a
// register (upd = regwr), from the ALU result whatever instruction writes:
// N = res[31], Z = (res[31:0] == 0), C = s3[0] for ROR and the ALU carry
// res[32] otherwise, V = signed overflow of ADD (B+A) or SUB (B-A) and 0 for
// every other operation. The active-low reset clears them asynchronously.
// All of this follows the document.
module trm_flags
  import trm_pkg::*;
(
  input  logic          clk,
  input  logic          rst,     // active low, asynchronous
  input  logic          upd,
  input  ctrl_t         ctrl,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW:0]   res,
  input  logic [DW-1:0] s3,
  output flags_t        flags
);
  always_ff @(posedge clk, negedge rst) begin
    if (~rst) begin
      flags <= '0;
    end else if (upd) begin
      flags.n <= res[31];
      flags.z <= (res[31:0] == '0);
      flags.c <= (ctrl.ror & s3[0]) | (~ctrl.ror & res[32]);
      flags.v <= ctrl.add & ((~a[31] & ~b[31] & res[31]) | (a[31] & b[31] & ~res[31]))
               | ctrl.sub & ((~b[31] & a[31] & res[31]) | (b[31] & ~a[31] & ~res[31]));
    end
  end
endmodule
