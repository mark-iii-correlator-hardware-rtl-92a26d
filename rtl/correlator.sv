// correlator -- 8 complex lags, or 16 real autocorrelation lags, with
// 23-bit accumulators.
//
// Cross mode: the rotated X bits x_cos and x_sin are compared with the Y
// bit delayed by k = 0..7 bits; real lag k counts the bits where x_cos
// agrees with Y(k), imaginary lag k where x_sin does, skipping blanked X
// and flagged Y bits. nre / nim count the bits that entered lag 0, the
// normaliser: the correlation coefficient of a lag is 2*count/n - 1.
// Auto mode (auto_mode): the unrotated X (or Y, with auto_y) stream is
// compared with itself delayed by k = 0..15 bits; lags 0..7 go to the real
// and lags 8..15 to the imaginary accumulators, nre and nim both count the
// unflagged bits.
//
// At bopp the finished period's counts are copied to the result registers
// and the counters restart with the current bit (double buffering), and the
// mode for the new period is taken from the pending parameters. One bit per
// dv; 23 bits hold more than 2 s at 4 Mbit/s and wrap beyond.
//
// Lags, accumulator width, auto mode and the bit counts are the document's;
// the agreement-count form and the lag order are this design's.
module correlator
  import mk3_pkg::*;
#(
  parameter int unsigned LAGS = NLAGS,
  parameter int unsigned W    = ACC_W
) (
  input  logic clk,
  input  logic rst,
  input  logic dv,
  input  logic bopp,
  input  logic auto_mode_new,
  input  logic auto_y_new,
  input  logic x_cos, cos_blank, x_sin, sin_blank,   // rotated X
  input  logic x, x_flag,                           // unrotated X (auto mode)
  input  logic y, y_flag,                           // delayed Y
  output logic [W-1:0] re_res [LAGS],
  output logic [W-1:0] im_res [LAGS],
  output logic [W-1:0] nre_res,
  output logic [W-1:0] nim_res
);
  localparam int unsigned TAPS = 2 * LAGS;

  logic [W-1:0] re_acc [LAGS];
  logic [W-1:0] im_acc [LAGS];
  logic [W-1:0] nre_acc, nim_acc;
  logic [TAPS-2:0] dd, df;          // delay line for taps 1..TAPS-1
  logic auto_q, autoy_q, auto_e, autoy_e;
  logic a, af;                      // auto-mode source
  logic d   [TAPS];
  logic dfl [TAPS];

  assign auto_e  = bopp ? auto_mode_new : auto_q;
  assign autoy_e = bopp ? auto_y_new : autoy_q;
  assign a  = autoy_e ? y : x;
  assign af = autoy_e ? y_flag : x_flag;

  always_comb begin
    d[0]   = auto_e ? a  : y;
    dfl[0] = auto_e ? af : y_flag;
    for (int k = 1; k < TAPS; k++) begin
      d[k]   = dd[k-1];
      dfl[k] = df[k-1];
    end
  end

  function automatic logic [W-1:0] inc(input logic [W-1:0] v, input logic c);
    return v + W'(c);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      dd <= '0; df <= '1; auto_q <= 1'b0; autoy_q <= 1'b0;
      nre_acc <= '0; nim_acc <= '0; nre_res <= '0; nim_res <= '0;
      for (int k = 0; k < LAGS; k++) begin
        re_acc[k] <= '0; im_acc[k] <= '0; re_res[k] <= '0; im_res[k] <= '0;
      end
    end else if (dv) begin
      logic cre [LAGS];
      logic cim [LAGS];
      logic cnr, cni;
      dd <= {dd[TAPS-3:0], d[0]};
      df <= {df[TAPS-3:0], dfl[0]};
      auto_q <= auto_e; autoy_q <= autoy_e;
      for (int k = 0; k < LAGS; k++) begin
        if (auto_e) begin
          cre[k] = !af && !dfl[k]        && (a == d[k]);
          cim[k] = !af && !dfl[k + LAGS] && (a == d[k + LAGS]);
        end else begin
          cre[k] = !cos_blank && !dfl[k] && (x_cos == d[k]);
          cim[k] = !sin_blank && !dfl[k] && (x_sin == d[k]);
        end
      end
      cnr = auto_e ? !af : (!cos_blank && !dfl[0]);
      cni = auto_e ? !af : (!sin_blank && !dfl[0]);
      if (bopp) begin
        for (int k = 0; k < LAGS; k++) begin
          re_res[k] <= re_acc[k]; im_res[k] <= im_acc[k];
          re_acc[k] <= W'(cre[k]); im_acc[k] <= W'(cim[k]);
        end
        nre_res <= nre_acc; nim_res <= nim_acc;
        nre_acc <= W'(cnr); nim_acc <= W'(cni);
      end else begin
        for (int k = 0; k < LAGS; k++) begin
          re_acc[k] <= inc(re_acc[k], cre[k]);
          im_acc[k] <= inc(im_acc[k], cim[k]);
        end
        nre_acc <= inc(nre_acc, cnr);
        nim_acc <= inc(nim_acc, cni);
      end
    end
  end
endmodule
