// pcal_detector -- one-channel complex correlator for the phase-cal tone.
//
// Counts, over the integration period, the unflagged bits that agree with
// the two-level cos and sin references, and the number of unflagged bits.
// The tone phase follows from atan2(2*s/n - 1, 2*c/n - 1). At bopp the
// counts are copied to the result registers and restart with the current
// bit. Counter width 23 bits like the main correlator (this design's choice).
module pcal_detector
  import mk3_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic clk,
  input  logic rst,
  input  logic dv,
  input  logic bopp,
  input  logic d,
  input  logic flag,
  input  logic cos_neg,
  input  logic sin_neg,
  output logic [W-1:0] c_res,
  output logic [W-1:0] s_res,
  output logic [W-1:0] n_res
);
  logic [W-1:0] c_acc, s_acc, n_acc;
  logic ic, is, in;
  assign in = !flag;
  assign ic = in && (d ^ cos_neg);
  assign is = in && (d ^ sin_neg);
  always_ff @(posedge clk) begin
    if (rst) begin
      c_acc <= '0; s_acc <= '0; n_acc <= '0; c_res <= '0; s_res <= '0; n_res <= '0;
    end else if (dv) begin
      if (bopp) begin
        c_res <= c_acc; s_res <= s_acc; n_res <= n_acc;
        c_acc <= W'(ic); s_acc <= W'(is); n_acc <= W'(in);
      end else begin
        c_acc <= c_acc + W'(ic); s_acc <= s_acc + W'(is); n_acc <= n_acc + W'(in);
      end
    end
  end
endmodule
