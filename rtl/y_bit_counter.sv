// y_bit_counter -- Y bit position within the frame and the buffer write
// address.
//
// Runs on the Y clock. bor marks bit 0 of a Y frame. The write address is
// the bit number modulo the buffer size (a 20000-bit frame is exactly five
// 4000-bit buffers, so the address also restarts at every bor). The bit
// count is also given in Gray code, registered, for the X-side latch that
// samples it asynchronously. waddr, we and bit_in_frame are combinational
// for the bit on the input.
module y_bit_counter
  import mk3_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_BITS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dv,
  input  logic        bor,
  output logic        we,
  output logic [11:0] waddr,
  output logic [14:0] bit_in_frame,
  output logic [14:0] count_gray
);
  logic [11:0] a_q;
  logic [14:0] b_q;
  logic        sync_q;        // a bor has been seen

  assign we           = dv && (sync_q || bor);
  assign waddr        = bor ? 12'd0 : a_q;
  assign bit_in_frame = bor ? 15'd0 : b_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0; b_q <= '0; sync_q <= 1'b0; count_gray <= '0;
    end else if (dv) begin
      if (bor) sync_q <= 1'b1;
      a_q <= (waddr == 12'(DEPTH - 1)) ? 12'd0 : waddr + 12'd1;
      b_q <= bit_in_frame + 15'd1;
      count_gray <= (bit_in_frame + 15'd1) ^ ((bit_in_frame + 15'd1) >> 1);
    end
  end
endmodule
