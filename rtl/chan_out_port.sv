// chan_out_port: outbound side of a TRM cell port.
//
// The TRM's I/O write strobe, I/O address and output bus are registered once
// (one cycle of latency, cutting the path from the core to the channel), and
// a write request for the channel is raised when the registered write
// targets ADDR. in_data of the channel is the registered output bus. This
// follows the document's generated interconnect; ADDR = 34 is the address
// the document uses for an output port.
module chan_out_port #(
  parameter logic [5:0] ADDR = 6'd34
) (
  input  logic        clk,
  input  logic [5:0]  ioadr,
  input  logic        iowr,
  input  logic [31:0] outbus,
  output logic        wreq,
  output logic [31:0] wdata
);
  logic [5:0] ioadr_reg;
  logic       iowr_reg;

  always_ff @(posedge clk) begin
    iowr_reg  <= iowr;
    ioadr_reg <= ioadr;
    wdata     <= outbus;
  end

  assign wreq = (ioadr_reg == ADDR) & iowr_reg;
endmodule
