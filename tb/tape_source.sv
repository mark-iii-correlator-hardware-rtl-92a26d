// tape_source -- testbench model of one reproduced tape track.
//
// Puts out one tape bit per clock in the frame format the decoder expects:
// per frame 2500 bytes, each sent MSB first and followed by an odd-parity bit.
// Bytes 0..7 carry AUX, 8..11 the all-ones sync word, 12..19 the 52-bit time
// (T0 plus the frame number) and its CRC-12, computed here bit by bit. The
// data bits are a hash of the global decoded-bit number n = frame*20000 + i,
// shifted by SHIFT bits, so two sources with different SHIFT carry the same
// noise with a known delay. Error injection: a parity error in byte PERR_BYTE
// of frame PERR_FRAME, a bad CRC in frame CRC_FRAME, no sync word in frames
// NOSYNC_FROM and NOSYNC_FROM+1. START_BYTE sets where in frame 0 it starts.
module tape_source #(
  parameter logic [63:0] AUX        = 64'h0123_4567_89AB_CD02,
  parameter logic [51:0] T0         = 52'h0_1234_5600_0000,
  parameter int          SHIFT      = 0,
  parameter int          START_BYTE = 0,
  parameter int          PERR_FRAME = -1,
  parameter int          PERR_BYTE  = 100,
  parameter int          CRC_FRAME  = -1,
  parameter int          NOSYNC_FROM = -1
) (
  input  logic clk,
  input  logic en,
  output logic bit_out
);
  int frame = 0;
  int pbyte = START_BYTE;
  int pbit  = 0;
  logic [7:0] cur;
  logic [159:0] hdr;

  function automatic logic hbit(longint n);
    longint unsigned x;
    x = longint'(n) * 64'h9E37_79B9_7F4A_7C15;
    x = x ^ (x >> 29);
    x = x * 64'hBF58_476D_1CE4_E5B9;
    return x[45];
  endfunction

  function automatic logic [11:0] crc_of(logic [147:0] bits);
    logic [11:0] c = '0;
    for (int i = 147; i >= 0; i--) begin
      logic fb = c[11] ^ bits[i];
      c = {c[10:0], 1'b0};
      if (fb) c = c ^ 12'h80F;
    end
    return c;
  endfunction

  function automatic logic [7:0] byte_of(int f, int b);
    logic [7:0] v;
    logic [147:0] h;
    logic [11:0] crc;
    if (b < 20) begin
      h = {AUX, (NOSYNC_FROM >= 0 && (f == NOSYNC_FROM || f == NOSYNC_FROM + 1)) ? 32'hFFFF_7FFF : 32'hFFFF_FFFF,
           T0 + 52'(f)};
      crc = crc_of(h);
      if (f == CRC_FRAME) crc = ~crc;
      v = ({h, crc} >> (8 * (19 - b)));
    end else begin
      for (int k = 0; k < 8; k++)
        v[7-k] = hbit(longint'(f) * 20000 + b * 8 + k - SHIFT);
    end
    return v;
  endfunction

  initial cur = byte_of(0, START_BYTE);

  always_comb begin
    if (pbit < 8) bit_out = cur[7 - pbit];
    else begin
      bit_out = ~(^cur);
      if (frame == PERR_FRAME && pbyte == PERR_BYTE) bit_out = ~bit_out;
    end
  end

  always @(posedge clk) if (en) begin
    if (pbit == 8) begin
      pbit <= 0;
      if (pbyte == 2499) begin
        pbyte <= 0; frame <= frame + 1; cur <= byte_of(frame + 1, 0);
      end else begin
        pbyte <= pbyte + 1; cur <= byte_of(frame, pbyte + 1);
      end
    end else pbit <= pbit + 1;
  end
endmodule
