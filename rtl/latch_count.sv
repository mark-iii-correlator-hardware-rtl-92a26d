// latch_count -- latches the Y bit count at the beginning of each
// integration period.
//
// The Gray-coded Y count comes from the Y clock domain and passes two
// synchronising flip-flops; at bopp its binary value is stored. With the Y
// time words, this tells the host how far apart the two tape drives are.
// The latch at BOPP is the document's; the Gray-code crossing is this
// design's. Near a Y frame boundary the count wraps and the sample can be
// off by a few bits.
module latch_count (
  input  logic        clk,
  input  logic        rst,
  input  logic        bopp,
  input  logic [14:0] count_gray,
  output logic [14:0] latched
);
  logic [14:0] s1, s2, bin;
  always_comb begin
    for (int i = 0; i < 15; i++) bin[i] = ^(s2 >> i);
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; latched <= '0;
    end else begin
      s1 <= count_gray;
      s2 <= s1;
      if (bopp) latched <= bin;
    end
  end
endmodule
