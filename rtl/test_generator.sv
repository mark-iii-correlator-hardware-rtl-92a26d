// test_generator -- on-board quasi-random test signal.
//
// A 23-bit maximal-length LFSR (x^23 + x^18 + 1) that restarts from a fixed
// seed at every beginning of record and steps once per decoded bit. With
// en set its output replaces the decoded data bit; the decoder's flags are
// kept. One copy sits on the X side and one on the Y side, so both streams
// carry the same sequence aligned to their frames: the correlator then
// shows full correlation at the lag that matches the buffer offset, without
// any host data. Combinational output, LFSR updated on dv.
// The document only says an internal quasi-random generator exists; the
// polynomial, seeding and injection point are this design's.
module test_generator (
  input  logic clk,
  input  logic rst,
  input  logic dv,
  input  logic bor,
  input  logic en,
  input  logic d,
  output logic d_out
);
  localparam logic [22:0] SEED = 23'h5A5A5A;
  logic [22:0] lfsr, cur;
  assign cur   = bor ? SEED : lfsr;
  assign d_out = en ? cur[22] : d;
  always_ff @(posedge clk) begin
    if (rst) lfsr <= SEED;
    else if (dv) lfsr <= {cur[21:0], cur[22] ^ cur[17]};
  end
endmodule
