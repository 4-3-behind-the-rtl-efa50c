// trm: TRM (Tiny Register Machine) processor core.
//
// A 32-bit single-cycle processor with 18-bit instructions, eight registers
// (r7 is the link register), condition flags N Z C V, a Harvard instruction
// memory of IMB blocks (each 512 x 36 bits = 1024 instructions) and a data
// memory of DMB blocks (each 512 x 32 bits). Every instruction completes in
// one cycle except loads and multiplies, which stall for one extra cycle: in
// the first cycle the PC is held and the register write is suppressed, in
// the second the loaded word (or product) is written. Stores are never
// delayed by a stall.
//
// Fetch: the instruction memory is read with the next PC (pcmux), so the
// word for PC is available in the cycle PC is current; PC[0] picks the half.
// Next PC: reset -> 0, stall -> PC, BL -> PC+1+off14, taken Bc ->
// PC+1+off10, BR/BLR -> operand A, otherwise PC+1. BL and BLR write PC+1 to
// the destination (r7 for BL).
//
// Loads and stores address word dmadr = rs + offset7, or offset7 alone when
// rs is r7. The uppermost 64 words of the data address space are the I/O
// space: there a store drives iowr for one cycle with outbus = value and
// ioadr = dmadr[5:0], and a load drives iord during both of its cycles and
// takes the word on inbus, registered at the end of the first cycle. A
// store to I/O does not write the data memory.
//
// Interface: clk, active-low rst (synchronous for PC, asynchronous for the
// flags); the I/O bus inbus, ioadr, iowr, iord, outbus; and a program-load
// port pm_we/pm_wadr/pm_wdat into the instruction memory, which is this
// design's addition. MUL_EN = 0 gives the simplified TRM without multiplier.
// The datapath and control equations follow the document; the condition
// codes, the multiplier, the block size and the reset values of the
// registers are this design's choices.
module trm
  import trm_pkg::*;
#(
  parameter int unsigned IMB       = 1,
  parameter int unsigned DMB       = 4,
  parameter bit          MUL_EN    = 1'b1,
  parameter string       CODE_FILE = "",
  localparam int unsigned PAW      = $clog2(IMB * 1024),   // PC width
  localparam int unsigned DAW      = $clog2(DMB * 512) - 1 // dmadr is [DAW:0]
) (
  input  logic              clk,
  input  logic              rst,      // active low
  input  logic [DW-1:0]     inbus,
  output logic [IOW-1:0]    ioadr,
  output logic              iowr,
  output logic              iord,
  output logic [DW-1:0]     outbus,
  input  logic              pm_we,
  input  logic [PAW-2:0]    pm_wadr,
  input  logic [35:0]       pm_wdat
);
  logic [PAW-1:0] pc, pcmux, nxpc;
  logic [35:0]    pmout;
  logic [IW-1:0]  ir;
  ctrl_t          c;
  logic [DW-1:0]  aa, b, a, imm, regmux, dmout, s3, mul_lo, h;
  logic [DW:0]    alu_res;
  logic [DAW:0]   dmadr, offset;
  logic           ioenb, ioenb_reg, dmwe, regwr, stall0, stall1, cond_ok, mul_op;
  logic [DW-1:0]  inbus_reg;
  flags_t         flags;

  // ---- fetch ------------------------------------------------------------
  trm_imem #(.BN(IMB), .INIT_FILE(CODE_FILE)) u_im (
    .clk, .adr(pcmux[PAW-1:1]), .dout(pmout),
    .we(pm_we), .wadr(pm_wadr), .din(pm_wdat));

  assign ir   = (~rst) ? NOP : (pc[0] ? pmout[35:18] : pmout[17:0]);
  assign nxpc = pc + 1'b1;

  trm_decoder u_dec (.ir, .ctrl(c));

  assign mul_op = c.mul & MUL_EN;

  // ---- operands ---------------------------------------------------------
  trm_regfile u_rf (.clk, .rst, .we(regwr), .a(c.dst), .dpra(c.irs),
                    .d(regmux), .b, .aa);

  assign imm = {22'b0, ir[9:0]};
  assign a   = c.is_reg ? aa : imm;

  trm_alu u_alu (.ctrl(c), .a, .b, .res(alu_res), .s3);

  // ---- multiplier (one-cycle stall) ---------------------------------------
  if (MUL_EN) begin : g_mul
    trm_mul u_mul (.clk, .rst, .a, .b, .commit(mul_op & ~stall0), .lo(mul_lo), .h);
  end else begin : g_nomul
    assign mul_lo = '0;
    assign h      = '0;
  end

  // ---- stall control ----------------------------------------------------
  assign stall0 = ((c.ldr & ~ir[10]) | mul_op) & ~stall1;

  always_ff @(posedge clk) begin
    if (~rst) stall1 <= 1'b0;
    else      stall1 <= stall0;
  end

  // ---- data memory and I/O ----------------------------------------------
  assign offset = {{(DAW - 6){1'b0}}, ir[9:3]};
  assign dmadr  = (c.irs == LR) ? offset : (aa[DAW:0] + offset);
  assign ioenb  = &dmadr[DAW:6];
  assign dmwe   = c.st & ~ir[10] & ~ioenb;

  trm_dmem #(.BN(DMB)) u_dm (.clk, .adr(dmadr), .wr_en(dmwe), .wr_dat(b), .rd_dat(dmout));

  always_ff @(posedge clk) begin
    ioenb_reg <= ioenb;
    inbus_reg <= inbus;
  end

  assign ioadr  = dmadr[IOW-1:0];
  assign iowr   = c.st & ~ir[10] & ioenb;
  assign iord   = c.ldr & ~ir[10] & ioenb;
  assign outbus = b;

  // ---- write back -------------------------------------------------------
  assign regwr = (c.bl | c.blr | (c.ldr & ~ir[10]) |
                  (~(ir[17] & ir[16]) & ~c.br & ~c.vector)) & ~stall0 & rst;

  always_comb begin
    if      (c.bl | c.blr)          regmux = {{(DW - PAW){1'b0}}, nxpc};
    else if (c.ldr & ~ioenb_reg)    regmux = dmout;
    else if (c.ldr & ioenb_reg)     regmux = inbus_reg;
    else if (mul_op)                regmux = mul_lo;
    else if (c.ror)                 regmux = s3;
    else if (c.ldh)                 regmux = h;
    else                            regmux = alu_res[DW-1:0];
  end

  trm_flags u_fl (.clk, .rst, .upd(regwr), .ctrl(c), .a, .b, .res(alu_res), .s3, .flags);

  // ---- next PC ----------------------------------------------------------
  assign cond_ok = cond_true(c.cond, flags);

  always_comb begin
    if      (~rst)            pcmux = '0;
    else if (stall0)          pcmux = pc;
    else if (c.bl)            pcmux = PAW'(signed'(ir[BLS-1:0])) + nxpc;
    else if (c.bc & cond_ok)  pcmux = PAW'(signed'(ir[9:0])) + nxpc;
    else if (c.blr | c.br)    pcmux = a[PAW-1:0];
    else                      pcmux = nxpc;
  end

  always_ff @(posedge clk) begin
    if (~rst) pc <= '0;
    else      pc <= pcmux;
  end

  // A load must be followed by its write-back cycle.
  a_ld_two_cycles: assert property (@(posedge clk) disable iff (~rst)
                                    stall0 |=> (pc == $past(pc)) && !stall0);
endmodule
