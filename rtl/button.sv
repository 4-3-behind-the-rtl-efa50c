// button: Button component of a cell.
//
// Brings W asynchronous button pins into the clock domain through a
// two-flip-flop synchroniser and presents them, zero extended, as a 32-bit
// word for the TRM's input bus (the interconnect selects it at I/O address
// 7). Latency from pin to out_data is two clock edges. The port names follow
// the document; the synchroniser and W = 4 (the lab board's four push
// buttons) are this design's choices. The synchroniser is not reset.
module button #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,      // active low; unused, kept for a uniform component interface
  input  logic [W-1:0] in_data,
  output logic [31:0]  out_data
);
  logic [W-1:0] s1, s2;

  // The synchroniser keeps sampling during reset, so the pins are valid as
  // soon as reset is released.
  always_ff @(posedge clk) begin
    s1 <= in_data;
    s2 <= s1;
  end

  assign out_data = {{(32 - W){1'b0}}, s2};
endmodule
