// y_buffer_memory -- the 4000-bit Y data buffer with its byte flags.
//
// A simple dual-port, dual-clock memory: the Y side writes one data bit and
// its flag per decoded Y bit; the X side reads the bit at the address given
// by the bit offset counter. Flags are kept once per 8 bits (500 flags),
// since the decoder flags whole bytes; the flag of a byte is the one written
// with its last bit. Reads are registered: rdata and rflag belong to the
// address presented with re one X clock earlier.
//
// 4000 bits of data and the separate smaller flag memory follow the document
// (the block diagram's 4K and .5K); one flag per 8 bits is this design's
// reading of the .5K.
module y_buffer_memory
  import mk3_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_BITS
) (
  input  logic        wclk,
  input  logic        we,
  input  logic [11:0] waddr,
  input  logic        wdata,
  input  logic        wflag,
  input  logic        rclk,
  input  logic        re,
  input  logic [11:0] raddr,
  output logic        rdata,
  output logic        rflag
);
  localparam int unsigned FDEPTH = (DEPTH + 7) / 8;
  logic dmem [DEPTH];
  logic fmem [FDEPTH];

  always_ff @(posedge wclk) begin
    if (we && waddr < 12'(DEPTH)) begin
      dmem[waddr] <= wdata;
      fmem[waddr[11:3]] <= wflag;
    end
  end

  always_ff @(posedge rclk) begin
    if (re) begin
      rdata <= dmem[(raddr < 12'(DEPTH)) ? raddr : 12'd0];
      rflag <= fmem[(raddr < 12'(DEPTH)) ? raddr[11:3] : 9'd0];
    end
  end
endmodule
