// pcal_generator -- two-level quadrature reference for phase-cal detection.
//
// The phase-cal tone must have a whole number of bits per quarter period,
// so the reference is a bit counter that rolls over every qlen+1 bits and a
// two-bit quadrant counter: cos is +1 in quadrants 0 and 3, sin in 0 and 1.
// At bopp the quarter length and the starting quadrant are loaded from the
// pending parameters and the counters restart with the current bit.
// Outputs are combinational for the bit on the input. One generator feeds
// the X and the Y detector, since both use the same tone frequency.
// The two-level scheme and the integer-bits-per-quarter rule are the
// document's; the parameter layout is this design's.
module pcal_generator (
  input  logic        clk,
  input  logic        rst,
  input  logic        dv,
  input  logic        bopp,
  input  logic [11:0] qlen_m1_new,
  input  logic [1:0]  quad0_new,
  output logic        cos_neg,
  output logic        sin_neg
);
  logic [11:0] c_q, c_e, len_q, len_e;
  logic [1:0]  q_q, q_e;
  assign c_e   = bopp ? 12'd0 : c_q;
  assign q_e   = bopp ? quad0_new : q_q;
  assign len_e = bopp ? qlen_m1_new : len_q;
  assign cos_neg = (q_e == 2'd1) || (q_e == 2'd2);
  assign sin_neg = q_e[1];
  always_ff @(posedge clk) begin
    if (rst) begin
      c_q <= '0; q_q <= '0; len_q <= '0;
    end else if (dv) begin
      len_q <= len_e;
      if (c_e == len_e) begin
        c_q <= '0; q_q <= q_e + 2'd1;
      end else begin
        c_q <= c_e + 12'd1; q_q <= q_e;
      end
    end
  end
endmodule
