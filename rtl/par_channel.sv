// par_channel: FIFO channel connecting the output port of one cell to the
// input port of another.
//
// A first-word-fall-through FIFO of DEPTH words of Size bits: out_data always
// shows the oldest word, and a read request (rdreq) at a rising edge removes
// it. A write request (wreq) appends in_data. A write and a read in the same
// cycle are both performed. A write to a full channel is dropped and a read
// of an empty one is ignored. The status word tells the reader
// bit 0 = data available and bit 1 = full; all other bits are 0.
// Port names, the Size parameter and the roles of data and status follow the
// document; the depth, the status encoding and the full/empty behaviour are
// this design's choices. Active-low synchronous reset empties the channel.
module par_channel #(
  parameter int unsigned Size  = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst,      // active low
  input  logic            wreq,
  input  logic            rdreq,
  input  logic [Size-1:0] in_data,
  output logic [Size-1:0] out_data,
  output logic [31:0]     status
);
  logic [Size-1:0] mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     count;
  logic            empty, full, do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW + 1)'(DEPTH));
  assign do_wr = wreq & ~full;
  assign do_rd = rdreq & ~empty;

  always_ff @(posedge clk) begin
    if (~rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) begin
        mem[wp] <= in_data;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW + 1)'(do_wr) - (AW + 1)'(do_rd);
    end
  end

  assign out_data = mem[rp];
  assign status   = {30'b0, full, ~empty};

  a_count_bound: assert property (@(posedge clk) disable iff (~rst) count <= (AW + 1)'(DEPTH));
endmodule
