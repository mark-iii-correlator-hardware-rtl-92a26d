// gate_store -- the T1 and dT/T2 mode-gate-time registers and comparators.
//
// Both times are bit numbers within the integration period. They are
// taken from the pending parameter words at bopp and compared with the
// X bit count of the period. t1 pulses on the bit T1. In normal mode
// dt_t2 then pulses every dT bits after T1 (dT = 0: never); these are the
// bit-shift instants of the fractional-bit correction. In pulsar mode dt_t2
// pulses once, on the bit T2 (the end of the processing window). Pulses are
// combinational and coincide with dv on the bit concerned.
//
// The document names the stores and what the times are for; the
// T1-then-every-dT rule is this design's reading of "dT or T2".
module gate_store (
  input  logic        clk,
  input  logic        rst,
  input  logic        dv,
  input  logic        bopp,
  input  logic [23:0] bit_in_per,
  input  logic [23:0] t1_new,
  input  logic [23:0] t2_new,
  input  logic        pulsar_new,
  output logic        t1,
  output logic        dt_t2,
  output logic        pulsar        // mode in force this period
);
  logic [23:0] t1_q, t2_q, next_q;
  logic        pulsar_q, armed_q;
  logic [23:0] t1_e, t2_e;
  logic        armed_e;

  assign t1_e    = bopp ? t1_new : t1_q;
  assign t2_e    = bopp ? t2_new : t2_q;
  assign pulsar  = bopp ? pulsar_new : pulsar_q;
  assign armed_e = bopp ? 1'b0 : armed_q;

  assign t1    = dv && (bit_in_per == t1_e);
  assign dt_t2 = dv && (pulsar ? (bit_in_per == t2_e)
                               : (armed_e && t2_e != 24'd0 && bit_in_per == next_q));

  always_ff @(posedge clk) begin
    if (rst) begin
      t1_q <= '0; t2_q <= '0; next_q <= '0; pulsar_q <= 1'b0; armed_q <= 1'b0;
    end else if (dv) begin
      t1_q <= t1_e; t2_q <= t2_e; pulsar_q <= pulsar; armed_q <= armed_e;
      if (!pulsar && t1) begin
        armed_q <= 1'b1;
        next_q  <= bit_in_per + t2_e;
      end else if (dt_t2) begin
        next_q  <= bit_in_per + t2_e;
      end
    end
  end
endmodule
