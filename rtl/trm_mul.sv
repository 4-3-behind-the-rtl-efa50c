// trm_mul: the TRM multiplier and its high-word register H.
//
// MUL stalls the core for one cycle (document). This design uses that cycle
// as a pipeline register: the signed 32 x 32 product of B and A is captured
// at the end of the first cycle (p), the low word p[31:0] is what the core
// writes to rd in the second cycle, and at the end of that cycle
// (commit = 1) the high word p[63:32] is stored in H, which LDH reads.
// Signedness and the moment H is loaded are this design's choices.
module trm_mul
  import trm_pkg::*;
(
  input  logic          clk,
  input  logic          rst,     // active low
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic          commit,
  output logic [DW-1:0] lo,
  output logic [DW-1:0] h
);
  logic signed [2*DW-1:0] p;

  always_ff @(posedge clk) begin
    if (~rst) begin
      p <= '0;
      h <= '0;
    end else begin
      p <= $signed(b) * $signed(a);
      if (commit) h <= p[2*DW-1:DW];
    end
  end

  assign lo = p[DW-1:0];
endmodule
