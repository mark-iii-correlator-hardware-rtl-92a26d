// tb_long_period -- the longest integration periods, run on the full-size
// module.
//
// Two tape_source tracks carry the same noise, Y playing 2000 bits ahead,
// with no injected errors, so with the buffer offset OFF every unflagged bit
// agrees at real lag OFF and the sine is blanked (phase 0, rate 0). Over the
// CAMAC dataway the host first sets a 400-frame period (2.0 s at 4 Mbit/s)
// and then a 512-frame period (2.56 s), and reads the results of each after
// its LAM. It checks:
//   * the LAM-to-LAM interval is exactly 400 x 22500 and 512 x 22500 X clocks
//     (one bit per clock, periods of whole frames);
//   * the X time words of the two periods are 400 frames apart;
//   * in the 2 s period, real lag OFF = 400 x 19840 = 7,936,000 agreements,
//     which still fits the 23-bit counters; the lag-0 bit count is 3 bits
//     per frame less (400 x 19837), because at lag 0 the Y header flags sit
//     OFF bits away from the X header flags;
//   * in the 2.56 s period the same counts for 512 frames (10,158,080 and
//     10,156,544) come back modulo 2^23: the 23-bit counters wrap, as
//     expected at that length.
module tb_long_period;
  import mk3_pkg::*;

  logic rst = 1;
  logic xclk = 0, yclk = 0;
  always #5 xclk = ~xclk;
  initial begin #3; forever #5 yclk = ~yclk; end

  localparam logic [51:0] T0 = 52'h0_1981_0405_0000;
  logic xbit, ybit;
  tape_source #(.T0(T0), .START_BYTE(2000)) xs (.clk(xclk), .en(1'b1), .bit_out(xbit));
  tape_source #(.T0(T0), .START_BYTE(2250)) ys (.clk(yclk), .en(1'b1), .bit_out(ybit));

  logic cam_n = 0, cam_s1 = 0, cam_s2 = 0, cam_c = 0, cam_z = 0, cam_b = 0;
  logic [4:0] cam_f = 0;
  logic [3:0] cam_a = 0;
  logic [23:0] cam_w = 0, cam_r;
  logic cam_l, cam_x, cam_q;

  correlator_module dut (.rst(rst), .trk_data({6'b0, ybit, xbit}), .trk_clk({6'b0, yclk, xclk}),
    .x_sel(3'd0), .y_sel(3'd1), .cam_n, .cam_f, .cam_a, .cam_w, .cam_r,
    .cam_s1, .cam_s2, .cam_c, .cam_z, .cam_b, .cam_l, .cam_x, .cam_q);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  longint cyc = 0;
  always @(posedge xclk) cyc <= cyc + 1;

  task automatic cycle(input logic [4:0] f, input logic [3:0] a, input word_t w, output word_t r);
    cam_n = 1; cam_f = f; cam_a = a; cam_w = w; cam_b = 1;
    repeat (6) @(posedge xclk);
    cam_s1 = 1; repeat (6) @(posedge xclk);
    r = cam_r;
    cam_s1 = 0; repeat (2) @(posedge xclk);
    cam_s2 = 1; repeat (6) @(posedge xclk);
    cam_s2 = 0; repeat (2) @(posedge xclk);
    cam_n = 0; cam_b = 0; repeat (6) @(posedge xclk);
  endtask
  task automatic wr(input int addr, input word_t w);
    word_t r;
    cycle(5'(16 + addr / 16), 4'(addr % 16), w, r);
  endtask

  word_t R [MEM_WORDS];
  longint lam_at;
  task automatic wait_lam_and_read();
    word_t r;
    @(posedge xclk iff cam_l);
    lam_at = cyc;
    for (int i = RES_BASE; i < RES_BASE + NRES; i++) begin
      cycle(5'(i / 16), 4'(i % 16), 0, r);
      R[i] = r;
    end
    cycle(5'd10, 4'd0, 0, r);
  endtask
  function automatic int res(int i); return int'(R[RES_BASE + i]); endfunction
  function automatic logic [51:0] xtime();
    return {R[RES_BASE + R_XTIME][3:0], R[RES_BASE + R_XTIME + 1], R[RES_BASE + R_XTIME + 2]};
  endfunction

  localparam int OFF = 3;
  localparam int UNFLAGGED = (FRAME_BYTES - HDR_BYTES) * 8;   // 19840 bits per frame

  task automatic set_period(int nrec);
    per_t p;
    ctrl_t c;
    c = '0; c.bit_offset = 12'(OFF);
    p = '0; p.nrec_m1 = 10'(nrec - 1); p.pcal_qlen = 12'd3;
    wr(W_PHASE0, 0); wr(W_RATE, 0); wr(W_ACCEL, 0); wr(W_CTRL, word_t'(c));
    wr(W_T1, 24'hFFFFFF); wr(W_T2, 0); wr(W_PER, word_t'(p));
  endtask

  initial begin
    longint lam_a, lam_b, lam_c;
    logic [51:0] t_b, t_c;
    longint n2, n256, nb2, nb256;
    repeat (20) @(posedge xclk);
    rst = 0;
    set_period(400);
    wait_lam_and_read();               // 1-frame period that was running
    lam_a = lam_at;
    set_period(512);                   // takes effect after the 400-frame period
    wait_lam_and_read();               // the 400-frame period
    lam_b = lam_at; t_b = xtime();
    n2 = longint'(400) * UNFLAGGED;
    nb2 = longint'(400) * (UNFLAGGED - OFF);
    chk(lam_b - lam_a == longint'(400) * FRAME_BYTES * 9, "2 s period: 400 frames of X clocks");
    chk(res(R_NRE) == int'(nb2), "2 s period: bits at lag 0 = 7,934,800");
    chk(res(R_RE + OFF) == int'(n2), "2 s period: full correlation at lag OFF");
    chk(res(R_NIM) == 0, "2 s period: sine blanked at phase 0");
    chk(R[RES_BASE + R_STAT][9] && R[RES_BASE + R_STAT][8], "2 s period: both decoders locked");
    wait_lam_and_read();               // the 512-frame period
    lam_c = lam_at; t_c = xtime();
    n256 = (longint'(512) * UNFLAGGED) % (longint'(1) << ACC_W);
    nb256 = (longint'(512) * (UNFLAGGED - OFF)) % (longint'(1) << ACC_W);
    chk(lam_c - lam_b == longint'(512) * FRAME_BYTES * 9, "2.56 s period: 512 frames of X clocks");
    chk(t_c - t_b == 52'd400, "X time words 400 frames apart");
    chk(res(R_NRE) == int'(nb256), "2.56 s period: bit count wraps at 2^23");
    chk(res(R_RE + OFF) == int'(n256), "2.56 s period: lag OFF wraps at 2^23");
    $display("2.56 s: lag OFF %0d (of %0d)", res(R_RE + OFF), longint'(512) * UNFLAGGED);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (22500 * 920) @(posedge xclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
