// fringe_rate_generator -- fringe phase model and three-level quadrature
// rotation signals.
//
// A 24-bit phase register (2*pi/2^24, about 0.4 microradian per step) is
// extended by 4 fraction bits so that one unit of the 25-bit signed phase
// rate is 2^-28 cycle per bit: 14.9 mHz at 4 Mbit/s, and the rate range is
// about +-250 kHz. The rate is multiplied by 2^rate_shift (0..7) to trade
// resolution for range. Phase acceleration: a 24-bit signed increment added
// to the rate every bit, in units of 2^-24 of a rate step.
// At bopp the phase, rate, acceleration and shift are loaded from the
// pending parameters and the loaded phase applies to that very bit.
//
// Three-level rotation: the circle is cut into 16 sectors (top 4 phase
// bits). cos is +1 for |phase| < 67.5 deg, 0 (blank) from 67.5 to 112.5 deg
// and -1 beyond; sin is the same function 90 deg later. Outputs are
// combinational for the bit on the input (dv).
//
// The 24-bit register, the 14.9 mHz resolution, the power-of-two resolution
// choice, the ~250 kHz limit, three-level rotation and acceleration
// compensation follow the document; the level thresholds, the fraction and
// acceleration widths are this design's choices.
module fringe_rate_generator
  import mk3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        dv,
  input  logic        bopp,
  input  logic [PHASE_W-1:0] phase0_new,
  input  logic signed [24:0] rate_new,
  input  logic signed [23:0] accel_new,
  input  logic [2:0]  shift_new,
  output logic        cos_neg,
  output logic        cos_blank,
  output logic        sin_neg,
  output logic        sin_blank,
  output logic [PHASE_W-1:0] phase    // phase of the current bit
);
  logic [27:0]        ph_q, ph_e;
  logic signed [48:0] rate_q, rate_e;
  logic signed [23:0] accel_q, accel_e;
  logic [2:0]         shift_q, shift_e;
  logic [27:0]        step;
  logic [3:0]         sc, ss;

  assign ph_e    = bopp ? {phase0_new, 4'h0} : ph_q;
  assign rate_e  = bopp ? {rate_new, 24'h0} : rate_q;
  assign accel_e = bopp ? accel_new : accel_q;
  assign shift_e = bopp ? shift_new : shift_q;
  assign step    = 28'($signed(rate_e[48:24])) << shift_e;
  assign phase   = ph_e[27:4];

  // three-level cos of a 16-sector angle: +1 (0,1,2,13,14,15), 0 (3,4,11,12), -1 (5..10)
  function automatic logic [1:0] lvl(input logic [3:0] s);   // {neg, blank}
    unique case (s)
      4'd0, 4'd1, 4'd2, 4'd13, 4'd14, 4'd15: lvl = 2'b00;
      4'd3, 4'd4, 4'd11, 4'd12:              lvl = 2'b01;
      default:                               lvl = 2'b10;
    endcase
  endfunction

  assign sc = phase[23:20];
  assign ss = phase[23:20] - 4'd4;
  assign {cos_neg, cos_blank} = lvl(sc);
  assign {sin_neg, sin_blank} = lvl(ss);

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q <= '0; rate_q <= '0; accel_q <= '0; shift_q <= '0;
    end else if (dv) begin
      ph_q    <= ph_e + step;
      rate_q  <= rate_e + 49'(accel_e);
      accel_q <= accel_e;
      shift_q <= shift_e;
    end
  end
endmodule
