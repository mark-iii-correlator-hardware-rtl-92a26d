// bit_offset_counter -- read address of the Y buffer.
//
// At bopp it is set to the a priori bit offset from the pending parameters,
// then it steps by one per X bit, modulo the buffer size. X bit i of the
// period thus reads the Y bit whose frame position is (offset + i) mod 4000.
// raddr is combinational for the bit on the input. The host computes the
// offset from the latched Y count; the counter itself is as the document
// describes, the modulo-4000 rule is this design's.
module bit_offset_counter
  import mk3_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_BITS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dv,
  input  logic        bopp,
  input  logic [11:0] offset_new,
  output logic [11:0] raddr
);
  logic [11:0] q;
  assign raddr = bopp ? ((offset_new < 12'(DEPTH)) ? offset_new : 12'd0) : q;
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else if (dv) q <= (raddr == 12'(DEPTH - 1)) ? 12'd0 : raddr + 12'd1;
  end
endmodule
