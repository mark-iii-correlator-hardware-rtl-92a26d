// scanner -- moves the results of each integration period into the host
// buffer and keeps the period's time words.
//
// The units latch their counts at bopp; on the next clock the scanner
// starts writing the NRES result words, one per clock, into words
// RES_BASE.. of the buffer, then pulses done (which raises the LAM).
// Time words: on the first X and the first Y time-word-ready after a bopp,
// the decoder's time and aux words are kept; at the next bopp they move to
// the set that is scanned out, so each scan reports the tape times at the
// start of the period it closes. Words 0..(R_XTIME-1) come in on res;
// time/aux are packed as 3 words each (MSB word first), the status word
// holds the CRC flags of those headers and whether they were seen.
// The block is in the block diagram (BOPP, XTWR, YTWR in); its sequence is
// this design's.
module scanner
  import mk3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        bopp,
  input  logic        xtwr,
  input  logic        ytwr,
  input  logic [TIME_BITS-1:0] x_time, y_time,
  input  logic [AUX_BITS-1:0]  x_aux, y_aux,
  input  logic        x_crc_err, y_crc_err,
  input  word_t       res [R_XTIME],
  output logic        we,
  output logic [5:0]  addr,
  output word_t       wdata,
  output logic        done
);
  typedef struct packed {
    logic [TIME_BITS-1:0] t;
    logic [AUX_BITS-1:0]  a;
    logic                 crc;
    logic                 seen;
  } tw_t;

  tw_t xc, yc, xd, yd;
  logic       busy;
  logic [5:0] idx;
  word_t      w;

  always_comb begin
    if (idx < 6'(R_XTIME)) begin
      w = res[idx[4:0]];
      if (idx == 6'(R_STAT))
        w = res[idx[4:0]] | word_t'({xd.seen, yd.seen, xd.crc, yd.crc}) << 20;
    end else begin
      unique case (idx)
        6'(R_XTIME + 0): w = word_t'(xd.t >> 48);
        6'(R_XTIME + 1): w = xd.t[47:24];
        6'(R_XTIME + 2): w = xd.t[23:0];
        6'(R_XTIME + 3): w = word_t'(xd.a >> 48);
        6'(R_XTIME + 4): w = xd.a[47:24];
        6'(R_XTIME + 5): w = xd.a[23:0];
        6'(R_YTIME + 0): w = word_t'(yd.t >> 48);
        6'(R_YTIME + 1): w = yd.t[47:24];
        6'(R_YTIME + 2): w = yd.t[23:0];
        6'(R_YTIME + 3): w = word_t'(yd.a >> 48);
        6'(R_YTIME + 4): w = yd.a[47:24];
        default:         w = yd.a[23:0];
      endcase
    end
  end

  assign we    = busy;
  assign addr  = 6'(RES_BASE) + idx;
  assign wdata = w;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      xc <= '0; yc <= '0; xd <= '0; yd <= '0; busy <= 1'b0; idx <= '0;
    end else begin
      if (bopp) begin
        xd <= xc; yd <= yc; xc.seen <= 1'b0; yc.seen <= 1'b0;
        busy <= 1'b1; idx <= '0;
      end else begin
        if (xtwr && !xc.seen) xc <= '{t: x_time, a: x_aux, crc: x_crc_err, seen: 1'b1};
        if (ytwr && !yc.seen) yc <= '{t: y_time, a: y_aux, crc: y_crc_err, seen: 1'b1};
        if (busy) begin
          if (idx == 6'(NRES - 1)) begin
            busy <= 1'b0; done <= 1'b1;
          end else begin
            idx <= idx + 6'd1;
          end
        end
      end
    end
  end
endmodule
