// mk3_pkg -- constants and types shared by the correlator-module RTL.
//
// Frame format. A decoded frame is 20000 bits (5 ms at 4 Mbit/s), so 512
// frames make the 2.56 s maximum integration period. On tape, each 8 data
// bits are followed by one odd-parity bit, which makes 2500 bytes = 22500 tape
// bits per frame. The first 20 bytes form the header: 64 auxiliary bits,
// a 32-bit sync word of ones, 52 time bits and a 12-bit CRCC. The layout,
// the bit order (MSB first) and the CRC polynomial are this design's own
// choices; only the 12-bit CRCC, the sync word and the parity bits are given.
//
// Host words. The host and the module exchange 24-bit words through a
// 64-word buffer. Words 0..6 (21 bytes) are the parameter words read at
// the start of every integration period (BOPP). Results go in words 8 and up.
package mk3_pkg;

  // ---- frame format ----
  localparam int unsigned FRAME_BYTES = 2500;
  localparam int unsigned FRAME_BITS  = FRAME_BYTES * 8;   // 20000 decoded bits
  localparam int unsigned AUX_BITS    = 64;
  localparam int unsigned SYNC_BITS   = 32;
  localparam int unsigned TIME_BITS   = 52;
  localparam int unsigned CRC_BITS    = 12;
  localparam int unsigned HDR_BYTES   = (AUX_BITS + SYNC_BITS + TIME_BITS + CRC_BITS) / 8; // 20
  localparam logic [11:0] CRC12_POLY  = 12'h80F;            // x^12+x^11+x^3+x^2+x+1

  // ---- module sizes from the document ----
  localparam int unsigned NLAGS       = 8;      // complex lags
  localparam int unsigned ACC_W       = 23;     // accumulation registers
  localparam int unsigned PHASE_W     = 24;     // fringe phase register
  localparam int unsigned BUF_BITS    = 4000;   // Y data buffer
  localparam int unsigned MAX_SHIFTS  = 15;     // bit shifts per period
  localparam int unsigned MAX_RECS    = 512;    // frames per period

  // ---- host word map ----
  localparam int unsigned WORD_W      = 24;
  localparam int unsigned MEM_WORDS   = 64;
  localparam int unsigned NPARAM      = 7;
  localparam int unsigned RES_BASE    = 8;

  localparam int unsigned W_PHASE0 = 0;  // initial fringe phase
  localparam int unsigned W_RATE   = 1;  // phase rate, low 24 bits
  localparam int unsigned W_ACCEL  = 2;  // phase acceleration (signed)
  localparam int unsigned W_CTRL   = 3;  // control, see ctrl_t
  localparam int unsigned W_T1     = 4;  // gate time T1 (bit in period)
  localparam int unsigned W_T2     = 5;  // dT (normal) or T2 (pulsar)
  localparam int unsigned W_PER    = 6;  // period length and phase-cal set-up

  typedef struct packed {
    logic        rate_sign;    // [23] sign bit of the 25-bit phase rate
    logic [1:0]  spare;        // [22:21]
    logic        test_en;      // [20] quasi-random test data instead of tape data
    logic        jump_neg;     // [19] phase jump is -90 (1) or +90 (0) per shift
    logic        delay_down;   // [18] Y delay steps 15->0 (1) or 0->15 (0)
    logic        pulsar;       // [17] pulsar gate mode
    logic        auto_y;       // [16] autocorrelation source: Y (1) or X (0)
    logic        auto_mode;    // [15] 16 real autocorrelation lags
    logic [2:0]  rate_shift;   // [14:12] phase-rate resolution = 2^rate_shift
    logic [11:0] bit_offset;   // [11:0] buffer read offset, 0..3999
  } ctrl_t;

  typedef struct packed {
    logic [1:0]  pcal_quad0;   // [23:22] phase-cal start quadrant
    logic [11:0] pcal_qlen;    // [21:10] phase-cal bits per quarter period, minus 1
    logic [9:0]  nrec_m1;      // [9:0]   frames per period minus 1 (0..511)
  } per_t;

  typedef logic [WORD_W-1:0] word_t;

  // ---- result words (index relative to RES_BASE) ----
  localparam int unsigned R_RE      = 0;   // 8 words: real part, lags 0..7
  localparam int unsigned R_IM      = 8;   // 8 words: imaginary part, lags 0..7
  localparam int unsigned R_NRE     = 16;  // bits correlated, real
  localparam int unsigned R_NIM     = 17;  // bits correlated, imaginary
  localparam int unsigned R_PCX     = 18;  // X phase-cal cos, sin, count
  localparam int unsigned R_PCY     = 21;  // Y phase-cal cos, sin, count
  localparam int unsigned R_ERR     = 24;  // X flags, Y flags, X ones, Y ones
  localparam int unsigned R_PARX    = 28;  // X parity errors
  localparam int unsigned R_PARY    = 29;  // Y parity errors
  localparam int unsigned R_LATCH   = 30;  // Y bit count latched at BOPP
  localparam int unsigned R_STAT    = 31;  // status bits
  localparam int unsigned R_XTIME   = 32;  // 3 words X time, 3 words X aux
  localparam int unsigned R_YTIME   = 38;  // 3 words Y time, 3 words Y aux
  localparam int unsigned NRES      = 44;

  // system configuration: six identical crates of fifteen modules, fed with
  // the 28 tracks of each of four tape drives
  localparam int unsigned NDRIVE = 4;
  localparam int unsigned NTRACK = 28;
  localparam int unsigned NSLOT  = NTRACK / 2 + 1;   // 14 track pairs + floating
  localparam int unsigned NCRATE = 6;

  // Odd parity bit for a byte.
  function automatic logic odd_parity(input logic [7:0] b);
    return ~(^b);
  endfunction

  // One serial CRC-12 step.
  function automatic logic [11:0] crc12_step(input logic [11:0] c, input logic d);
    logic fb;
    fb = c[11] ^ d;
    return {c[10:0], 1'b0} ^ (fb ? CRC12_POLY : 12'h000);
  endfunction

endpackage
