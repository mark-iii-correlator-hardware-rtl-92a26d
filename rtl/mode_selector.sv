// mode_selector -- +-90 deg * n phase jumps and the pulsar gate.
//
// n counts the bit shifts made so far in the period (at most 15). Each
// shift (t1 or dt_t2 in normal mode) turns the rotation signals by a further
// +90 deg, or -90 deg when jump_neg is set, starting with the bit after the
// shift; this goes with the one-bit step of the programmable Y delay
// ("automatic fractional-bit error correction"). A 90 deg turn of cos+j*sin
// maps (cos, sin) to (-sin, cos). In pulsar mode no jumps are made and both
// outputs are blanked outside the window T1 <= bit < T2. n and the mode are
// reset at bopp. Combinational outputs for the current bit.
//
// The function comes from the document; the sign convention, the timing of
// the jump and the window bounds are this design's.
module mode_selector (
  input  logic clk,
  input  logic rst,
  input  logic dv,
  input  logic bopp,
  input  logic jump_neg_new,
  input  logic pulsar,          // mode in force (from gate_store)
  input  logic t1,
  input  logic dt_t2,
  input  logic cos_neg, cos_blank, sin_neg, sin_blank,
  output logic cosp_neg, cosp_blank, sinp_neg, sinp_blank,
  output logic [3:0] nshift
);
  logic [1:0] quad_q, quad_e;
  logic [3:0] n_q, n_e;
  logic       neg_q, neg_e, gate_q, gate_e, shift_ev;

  assign quad_e = bopp ? 2'd0 : quad_q;
  assign n_e    = bopp ? 4'd0 : n_q;
  assign neg_e  = bopp ? jump_neg_new : neg_q;
  assign gate_e = t1 ? 1'b1 : (dt_t2 ? 1'b0 : (bopp ? 1'b0 : gate_q));
  assign shift_ev = !pulsar && (t1 || dt_t2) && (n_e != 4'd15);
  assign nshift = n_e;

  logic cn, cb, sn, sb;
  always_comb begin
    unique case (quad_e)
      2'd0: {cn, cb, sn, sb} = {cos_neg,  cos_blank, sin_neg,  sin_blank};
      2'd1: {cn, cb, sn, sb} = {!sin_neg, sin_blank, cos_neg,  cos_blank};
      2'd2: {cn, cb, sn, sb} = {!cos_neg, cos_blank, !sin_neg, sin_blank};
      default: {cn, cb, sn, sb} = {sin_neg, sin_blank, !cos_neg, cos_blank};
    endcase
    cosp_neg   = cn;
    sinp_neg   = sn;
    cosp_blank = cb || (pulsar && !gate_e);
    sinp_blank = sb || (pulsar && !gate_e);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      quad_q <= '0; n_q <= '0; neg_q <= 1'b0; gate_q <= 1'b0;
    end else if (dv) begin
      neg_q  <= neg_e;
      gate_q <= gate_e;
      n_q    <= shift_ev ? n_e + 4'd1 : n_e;
      quad_q <= shift_ev ? (neg_e ? quad_e - 2'd1 : quad_e + 2'd1) : quad_e;
    end
  end
endmodule
