// game_top: two communicating TRM cells, the "Game" cell network.
//
// A Controller cell and an IO cell, each a TRM processor, joined by two
// FIFO channels: channel 0 carries words from the Controller's output port to
// the IO cell's input port, channel 1 from the IO cell's output port to the
// Controller's input port. The IO cell also owns an LED component (written
// at I/O address 7) and a Button component (read at I/O address 7).
//
// I/O map of each TRM (uppermost 64 words of its data address space):
//   32  read: front word of the input channel (the load removes it)
//   33  read: status of the input channel (bit 0 data available, bit 1 full)
//   34  write: append a word to the output channel
//   7   IO cell only: write LEDs (low byte), read buttons
// Writes reach a channel one cycle after the store (registered write path);
// a load from address 32 removes the word one cycle after it was captured.
//
// Programs are loaded through the pm_* ports (one instruction-memory word,
// two instructions, per write, while the cells are held in reset) or from
// CTRL_CODE / IO_CODE hex files at time zero. Memory sizes IMB = 1 and
// DMB = 4 are those the document gives for the IO cell; the Controller is
// given the same sizes. The structure follows the document; addresses 7
// for the LEDs and the sizes of the Controller are this design's choices.
module game_top #(
  parameter int unsigned IMB       = 1,
  parameter int unsigned DMB       = 4,
  parameter int unsigned CH_DEPTH  = 16,
  parameter string       CTRL_CODE = "",
  parameter string       IO_CODE   = "",
  localparam int unsigned PMAW     = $clog2(IMB * 512)
) (
  input  logic            clk,
  input  logic            rst,          // active low
  input  logic [3:0]      btn,          // button pins
  output logic [7:0]      leds,         // LED pins
  input  logic            ctrl_pm_we,
  input  logic            io_pm_we,
  input  logic [PMAW-1:0] pm_wadr,
  input  logic [35:0]     pm_wdat
);
  // Controller TRM
  logic [31:0] c_inbus, c_outbus;
  logic [5:0]  c_ioadr;
  logic        c_iowr, c_iord;
  // IO TRM
  logic [31:0] i_inbus, i_outbus;
  logic [5:0]  i_ioadr;
  logic        i_iowr, i_iord;
  // channels
  logic        ch0_wreq, ch0_rdreq, ch1_wreq, ch1_rdreq;
  logic [31:0] ch0_in, ch0_out, ch0_status, ch1_in, ch1_out, ch1_status;
  logic        c_sel, i_sel;
  logic [31:0] c_rdata, i_rdata, btn_data;

  trm #(.IMB(IMB), .DMB(DMB), .CODE_FILE(CTRL_CODE)) u_ctrl (
    .clk, .rst, .inbus(c_inbus), .ioadr(c_ioadr), .iowr(c_iowr), .iord(c_iord),
    .outbus(c_outbus), .pm_we(ctrl_pm_we), .pm_wadr, .pm_wdat);

  trm #(.IMB(IMB), .DMB(DMB), .CODE_FILE(IO_CODE)) u_io (
    .clk, .rst, .inbus(i_inbus), .ioadr(i_ioadr), .iowr(i_iowr), .iord(i_iord),
    .outbus(i_outbus), .pm_we(io_pm_we), .pm_wadr, .pm_wdat);

  // channel 0: Controller.out -> IO.in
  chan_out_port u_c_out (.clk, .ioadr(c_ioadr), .iowr(c_iowr), .outbus(c_outbus),
                         .wreq(ch0_wreq), .wdata(ch0_in));
  par_channel #(.Size(32), .DEPTH(CH_DEPTH)) u_ch0 (
    .clk, .rst, .wreq(ch0_wreq), .rdreq(ch0_rdreq), .in_data(ch0_in),
    .out_data(ch0_out), .status(ch0_status));
  chan_in_port u_i_in (.clk, .rst, .ioadr(i_ioadr), .iord(i_iord),
                       .chan_data(ch0_out), .chan_status(ch0_status),
                       .rdreq(ch0_rdreq), .sel(i_sel), .rdata(i_rdata));

  // channel 1: IO.out -> Controller.in
  chan_out_port u_i_out (.clk, .ioadr(i_ioadr), .iowr(i_iowr), .outbus(i_outbus),
                         .wreq(ch1_wreq), .wdata(ch1_in));
  par_channel #(.Size(32), .DEPTH(CH_DEPTH)) u_ch1 (
    .clk, .rst, .wreq(ch1_wreq), .rdreq(ch1_rdreq), .in_data(ch1_in),
    .out_data(ch1_out), .status(ch1_status));
  chan_in_port u_c_in (.clk, .rst, .ioadr(c_ioadr), .iord(c_iord),
                       .chan_data(ch1_out), .chan_status(ch1_status),
                       .rdreq(ch1_rdreq), .sel(c_sel), .rdata(c_rdata));

  // IO cell components
  led u_led (.clk, .rst, .in_data(i_outbus[7:0]), .ioadr(i_ioadr), .iowr(i_iowr),
             .out_data(leds));
  button #(.W(4)) u_btn (.clk, .rst, .in_data(btn), .out_data(btn_data));

  // input-bus data muxes
  assign i_inbus = i_sel ? i_rdata : (i_ioadr == 6'd7) ? btn_data : '0;
  assign c_inbus = c_sel ? c_rdata : '0;
endmodule
