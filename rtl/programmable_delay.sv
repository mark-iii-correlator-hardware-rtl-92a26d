// programmable_delay -- 0 to 15 bit delay of the Y data and flags.
//
// A 15-stage shift register (advanced on every X bit) with a tap select.
// At bopp the tap is set to 0, or to 15 when delay_down is set. Each bit
// shift (t1 or dt_t2 in normal mode) then moves the tap by one bit, from the
// next bit on, for at most 15 shifts per period. Outputs are combinational:
// tap 0 is the input bit itself.
// The 0-15 range and the 15 shifts follow the document; the direction
// control and the reset value are this design's.
module programmable_delay (
  input  logic clk,
  input  logic rst,
  input  logic dv,
  input  logic bopp,
  input  logic delay_down_new,
  input  logic pulsar,
  input  logic t1,
  input  logic dt_t2,
  input  logic y,
  input  logic y_flag,
  output logic yd,
  output logic yd_flag,
  output logic [3:0] tap
);
  logic [14:0] sd, sf;
  logic [3:0]  tap_q, n_q, n_e;
  logic        down_q, down_e, ev;

  assign down_e = bopp ? delay_down_new : down_q;
  assign tap    = bopp ? (delay_down_new ? 4'd15 : 4'd0) : tap_q;
  assign n_e    = bopp ? 4'd0 : n_q;
  assign ev     = !pulsar && (t1 || dt_t2) && (n_e != 4'd15);
  assign yd      = (tap == 4'd0) ? y      : sd[tap - 4'd1];
  assign yd_flag = (tap == 4'd0) ? y_flag : sf[tap - 4'd1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sd <= '0; sf <= '1; tap_q <= '0; n_q <= '0; down_q <= 1'b0;
    end else if (dv) begin
      sd <= {sd[13:0], y};
      sf <= {sf[13:0], y_flag};
      down_q <= down_e;
      n_q    <= ev ? n_e + 4'd1 : n_e;
      tap_q  <= ev ? (down_e ? tap - 4'd1 : tap + 4'd1) : tap;
    end
  end
endmodule
