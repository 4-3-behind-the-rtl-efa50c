// chan_in_port: inbound side of a TRM cell port.
//
// Reading I/O address DATA_ADDR returns the channel's front word and reading
// STATUS_ADDR its status word (sel = 1 and rdata carry them). A load from
// DATA_ADDR raises the TRM's iord for two cycles; the read request to the
// channel is a register set in the cycle after the first one and cleared
// the cycle after, so each load removes exactly one word, after the core has
// captured it. Addresses 32 and 33 and the registered, self-clearing read
// request follow the document.
module chan_in_port #(
  parameter logic [5:0] DATA_ADDR   = 6'd32,
  parameter logic [5:0] STATUS_ADDR = 6'd33
) (
  input  logic        clk,
  input  logic        rst,       // active low
  input  logic [5:0]  ioadr,
  input  logic        iord,
  input  logic [31:0] chan_data,
  input  logic [31:0] chan_status,
  output logic        rdreq,
  output logic        sel,
  output logic [31:0] rdata
);
  always_ff @(posedge clk) begin
    if (~rst) rdreq <= 1'b0;
    else      rdreq <= (ioadr == DATA_ADDR) & ~rdreq & iord;
  end

  always_comb begin
    sel   = 1'b1;
    rdata = '0;
    if      (ioadr == DATA_ADDR)   rdata = chan_data;
    else if (ioadr == STATUS_ADDR) rdata = chan_status;
    else                           sel   = 1'b0;
  end
endmodule
