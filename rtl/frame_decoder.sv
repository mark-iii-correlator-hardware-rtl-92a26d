// frame_decoder -- synchronises to a recorded track, strips parity and
// extracts the frame header.
//
// The track arrives one tape bit per clock: each group of 8 data bits is
// followed by an odd-parity bit. While unlocked the decoder searches for a
// zero followed by 36 ones (the 32-bit all-ones sync word with its four
// parity bits of one); the bit before the sync word is the parity bit of
// the last auxiliary byte, so the format requires that byte to have an odd
// number of ones. After the search hit the decoder flywheels on its own
// byte/bit counters and checks the sync word in every frame; two frames in a
// row with a bad sync word drop the lock.
//
// Each byte is held until its parity bit has been seen, then put out bit by
// bit during the next byte's eight data slots, so a parity error can flag
// the whole byte: latency is one byte (9 clocks). Header bytes are also
// flagged so they are never correlated. At the end of the 20-byte header
// the time and auxiliary fields are loaded, the CRC-12 over aux, sync and
// time is compared with the recorded CRCC, and twr (time word ready) pulses.
// Parity errors are counted; the total is published once per frame, so it
// is stable for a whole frame for a reader in another clock domain.
//
// The document gives the decoder's duties (sync, time/aux extraction, 12-bit
// CRCC check, parity stripping and error counting); the frame layout, the
// search rule and the loss-of-lock rule are this design's own.
module frame_decoder
  import mk3_pkg::*;
#(
  parameter int unsigned NBYTES = FRAME_BYTES   // bytes per frame
) (
  input  logic        clk,       // tape (reproduce) clock, flywheels
  input  logic        rst,       // synchronous, active high
  input  logic        din,       // tape bit
  output logic        dv,        // a decoded bit is on dout this cycle
  output logic        dout,      // decoded data bit
  output logic        dflag,     // bit is invalid (header or parity error)
  output logic        bor,       // dv and first bit of a frame (beginning of record)
  output logic        twr,       // header decoded, time/aux updated
  output logic [TIME_BITS-1:0] time_word,
  output logic [AUX_BITS-1:0]  aux_word,
  output logic        crc_err,   // CRC or parity error in the last header
  output logic        locked,
  output logic [15:0] par_errs   // parity errors since reset, updated per frame
);
  localparam int unsigned HB = HDR_BYTES * 8;   // 160 header bits

  logic [11:0] pbyte;        // byte position in frame
  logic [3:0]  pbit;         // 0..7 data, 8 parity
  logic [5:0]  run;          // consecutive ones while searching
  logic        seen_zero;
  logic [7:0]  sh;           // byte being received
  logic [7:0]  obyte;        // byte being put out
  logic        oflag, ofirst, ovalid;
  logic [HB-1:0] hdr;
  logic [11:0] crc;
  logic        hdr_ok;       // this frame's header was seen from its start
  logic        hdr_perr;
  logic        sync_bad;
  logic        miss;
  logic [15:0] par_acc;

  logic        perr;
  logic        last_bit;
  logic [15:0] hb;           // header bit index of the current data bit

  assign perr     = ~(^{sh, din});
  assign last_bit = (pbit == 4'd8) && (pbyte == 12'(NBYTES - 1));
  assign hb       = 16'({pbyte, 3'b000}) + 16'(pbit);

  always_ff @(posedge clk) begin
    twr <= 1'b0;
    if (rst) begin
      locked <= 1'b0; run <= '0; seen_zero <= 1'b0;
      pbyte <= '0; pbit <= '0; sh <= '0; obyte <= '0;
      oflag <= 1'b1; ofirst <= 1'b0; ovalid <= 1'b0;
      hdr <= '0; crc <= '0; hdr_ok <= 1'b0; hdr_perr <= 1'b0;
      sync_bad <= 1'b0; miss <= 1'b0; par_acc <= '0; par_errs <= '0;
      time_word <= '0; aux_word <= '0; crc_err <= 1'b0;
    end else if (!locked) begin
      // search: a zero, then 36 ones
      if (!din) begin
        run <= '0; seen_zero <= 1'b1;
      end else if (seen_zero && run == 6'd35) begin
        locked <= 1'b1; pbyte <= 12'd12; pbit <= '0;
        ovalid <= 1'b0; hdr_ok <= 1'b0; hdr_perr <= 1'b0;
        sync_bad <= 1'b0; miss <= 1'b0; crc <= '0;
        run <= '0; seen_zero <= 1'b0;
      end else if (run != 6'd63) begin
        run <= run + 6'd1;
      end
    end else begin
      // ---- bit / byte position ----
      if (pbit == 4'd8) begin
        pbit  <= '0;
        pbyte <= last_bit ? 12'd0 : pbyte + 12'd1;
      end else begin
        pbit <= pbit + 4'd1;
      end

      if (pbit != 4'd8) begin
        sh <= {sh[6:0], din};
        if (pbyte < 12'(HDR_BYTES)) hdr <= {hdr[HB-2:0], din};
        if (hb < 16'(AUX_BITS + SYNC_BITS + TIME_BITS)) crc <= crc12_step(crc, din);
        if (pbyte >= 12'd8 && pbyte < 12'd12 && !din) sync_bad <= 1'b1;
      end else begin
        // parity bit: byte complete
        obyte  <= sh;
        oflag  <= perr || (pbyte < 12'(HDR_BYTES));
        ofirst <= (pbyte == 12'd0);
        ovalid <= 1'b1;
        if (perr) par_acc <= par_acc + 16'd1;
        if (perr && pbyte < 12'(HDR_BYTES)) hdr_perr <= 1'b1;
        if (pbyte >= 12'd8 && pbyte < 12'd12 && !din) sync_bad <= 1'b1;
        // sync check at the end of the sync word
        if (pbyte == 12'd11) begin
          if (sync_bad || !din) begin
            miss <= 1'b1;
            if (miss) locked <= 1'b0;
          end else begin
            miss <= 1'b0;
          end
        end
        // end of header
        if (pbyte == 12'(HDR_BYTES - 1)) begin
          if (hdr_ok) begin
            aux_word  <= hdr[HB-1 -: AUX_BITS];
            time_word <= hdr[CRC_BITS +: TIME_BITS];
            crc_err   <= (hdr[CRC_BITS-1:0] != crc) || hdr_perr || perr;
            twr       <= 1'b1;
          end
        end
        if (last_bit) begin
          par_errs <= par_acc + (perr ? 16'd1 : 16'd0);
          hdr_ok   <= 1'b1;
          hdr_perr <= 1'b0;
          sync_bad <= 1'b0;
          crc      <= '0;
        end
      end
    end
  end

  assign dv    = locked && ovalid && (pbit != 4'd8);
  assign dout  = obyte[3'(7 - pbit)];
  assign dflag = oflag;
  assign bor   = dv && ofirst && (pbit == 4'd0);

endmodule
