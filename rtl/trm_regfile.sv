// trm_regfile: the TRM's eight 32-bit registers.
//
// One synchronous write port and two asynchronous read ports, the shape of a
// dual-port distributed RAM: port A (address dst) is written at the rising
// clock edge when we is high and is read combinationally as B; the second
// read port DPRA (address irs) gives AA. A read of the register being
// written returns the old value until the edge. Registers are cleared by the
// active-low reset (the document does not describe register reset; this
// design clears them so that simulation starts from known values).
module trm_regfile
  import trm_pkg::*;
(
  input  logic          clk,
  input  logic          rst,     // active low
  input  logic          we,
  input  logic [2:0]    a,       // write address and read address of B
  input  logic [2:0]    dpra,    // read address of AA
  input  logic [DW-1:0] d,
  output logic [DW-1:0] b,
  output logic [DW-1:0] aa
);
  logic [DW-1:0] r [8];

  always_ff @(posedge clk) begin
    if (~rst) begin
      for (int i = 0; i < 8; i++) r[i] <= '0;
    end else if (we) begin
      r[a] <= d;
    end
  end

  assign b  = r[a];
  assign aa = r[dpra];
endmodule
