// camac_decode -- decodes the CAMAC function code F and subaddress A.
//
// The 64-word buffer needs six address bits but a CAMAC command carries
// only a 4-bit subaddress, so the two low bits of F supply the two address
// MSBs: F0..F3 read page F[1:0] (read group 1/2, read and clear, read
// complement in the standard all act as a plain read here) and F16..F19
// write page F[1:0]. Also decoded: F8 test LAM, F10 clear LAM, F24 disable
// LAM, F26 enable LAM. Combinational.
// That F gives the two MSBs is in the block diagram; which codes are used is
// this design's choice, after the CAMAC function code groups.
module camac_decode (
  input  logic [4:0] f,
  input  logic [3:0] a,
  output logic [5:0] addr,
  output logic       rd,
  output logic       wr,
  output logic       test_lam,
  output logic       clr_lam,
  output logic       dis_lam,
  output logic       en_lam,
  output logic       valid
);
  always_comb begin
    addr     = {f[1:0], a};
    rd       = (f[4:2] == 3'b000);
    wr       = (f[4:2] == 3'b100);
    test_lam = (f == 5'd8);
    clr_lam  = (f == 5'd10);
    dis_lam  = (f == 5'd24);
    en_lam   = (f == 5'd26);
    valid    = rd || wr || test_lam || clr_lam || dis_lam || en_lam;
  end
endmodule
