// trm_dmem: TRM data memory.
//
// BN block-RAM blocks of 512 words x 32 bits with one clocked read port and
// one write port sharing the address, as in the document's datapath: at the
// rising edge the word at adr is written when wr_en is high and rd_dat takes
// the word at adr (old contents on a simultaneous write). Because the read
// data arrives one cycle late, the core stalls one cycle on every load.
// The 512-word block size is this design's choice.
module trm_dmem #(
  parameter int unsigned BN        = 4,
  localparam int unsigned DEPTH    = BN * 512,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] adr,
  input  logic          wr_en,
  input  logic [31:0]   wr_dat,
  output logic [31:0]   rd_dat
);
  logic [31:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (wr_en) mem[adr] <= wr_dat;
    rd_dat <= mem[adr];
  end
endmodule
