// x_bit_counter -- X bit position within the record and within the
// integration (parameter) period, and the BOPP strobe.
//
// Counts decoded X bits (dv). bor marks bit 0 of a record (frame). A record
// counter runs alongside; when the record that just ended was the last of
// the period, the next bor is also the beginning of a parameter period
// (bopp). The period length in frames (1..512) is taken from the pending
// parameter word at each bopp, so a new length applies from the next period;
// the first bor after reset always starts a period. All count outputs
// describe the bit on the input this cycle and are combinational; bopp is
// high together with dv and bor.
//
// The 1-record bit counter, the record count and BOPP come from the block
// diagram; the integration period of 1 to 512 frames from the text.
module x_bit_counter
  import mk3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        dv,
  input  logic        bor,
  input  logic [9:0]  nrec_m1_new,   // pending: frames per period minus 1
  output logic [14:0] bit_in_rec,    // 0..19999
  output logic [9:0]  rec_in_per,    // 0..nrec-1
  output logic [23:0] bit_in_per,
  output logic        bopp,
  output logic        running        // a period has started since reset
);
  logic [14:0] bit_q;
  logic [9:0]  rec_q, nrec_q;
  logic [23:0] per_q;

  assign bopp       = dv && bor && (!running || rec_q == nrec_q);
  assign bit_in_rec = bor ? 15'd0 : bit_q;
  assign rec_in_per = bopp ? 10'd0 : (bor ? rec_q + 10'd1 : rec_q);
  assign bit_in_per = bopp ? 24'd0 : per_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_q <= '0; rec_q <= '0; nrec_q <= '0; per_q <= '0; running <= 1'b0;
    end else if (dv) begin
      bit_q <= bit_in_rec + 15'd1;
      per_q <= bit_in_per + 24'd1;
      if (bor) begin
        rec_q <= rec_in_per;
        if (bopp) begin
          nrec_q  <= nrec_m1_new;
          running <= 1'b1;
        end
      end
    end
  end
endmodule
