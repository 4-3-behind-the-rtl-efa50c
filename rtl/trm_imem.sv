// trm_imem: TRM instruction memory.
//
// BN block-RAM blocks of 512 words x 36 bits; each word holds two 18-bit
// instructions, the even one in bits [17:0] and the odd one in [35:18]. The
// read is clocked: adr is sampled at the rising edge and dout shows that
// word during the next cycle, so the core presents its next PC (pcmux) here
// and reads the instruction of PC in the following cycle. The write port is
// this design's addition for loading programs (on the FPGA the code is
// patched into the bitstream instead); INIT_FILE, when not empty, is loaded
// with $readmemh at time zero. The 512-word block size is this design's
// reading of the document's memory-size figures.
module trm_imem #(
  parameter int unsigned BN        = 1,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH    = BN * 512,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] adr,
  output logic [35:0]   dout,
  input  logic          we,
  input  logic [AW-1:0] wadr,
  input  logic [35:0]   din
);
  logic [35:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[wadr] <= din;
    dout <= mem[adr];
  end
endmodule
