// led: LED component of a cell.
//
// An 8-bit output register that drives the LED pins. It watches the cell's
// I/O bus and loads in_data (the low byte of the TRM's output bus) when the
// TRM writes I/O address ADDR. Ports follow the document; the address (7,
// the same number the Button component is read at) and the reset value 0
// are this design's choices.
module led #(
  parameter logic [5:0] ADDR = 6'd7
) (
  input  logic       clk,
  input  logic       rst,        // active low
  input  logic [7:0] in_data,
  input  logic [5:0] ioadr,
  input  logic       iowr,
  output logic [7:0] out_data
);
  always_ff @(posedge clk) begin
    if (~rst)                        out_data <= '0;
    else if (iowr && ioadr == ADDR)  out_data <= in_data;
  end
endmodule
