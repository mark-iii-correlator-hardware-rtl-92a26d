// rotation_blanking -- applies the quadrature rotation signals to the X data.
//
// Samples are one bit, 1 meaning +1 and 0 meaning -1, so multiplying by a
// rotation level of -1 inverts the bit. Outputs X*cos' and X*sin' and their
// blank signals; a rotation level of 0 or a flagged X bit blanks the output.
// Purely combinational. The four outputs are those of the block diagram;
// the bit coding is this design's.
module rotation_blanking (
  input  logic x,
  input  logic x_flag,
  input  logic cosp_neg, cosp_blank, sinp_neg, sinp_blank,
  output logic x_cos, cos_blank,
  output logic x_sin, sin_blank
);
  always_comb begin
    x_cos     = x ^ cosp_neg;
    x_sin     = x ^ sinp_neg;
    cos_blank = cosp_blank || x_flag;
    sin_blank = sinp_blank || x_flag;
  end
endmodule
