// tb_correlator_module -- end-to-end test of one correlator module at its
// full size (20000-bit frames, 4000-bit buffer, 8 lags, 23-bit counters).
//
// Two tape_source models feed track inputs 0 (X) and 1 (Y). They carry the
// same noise, the Y drive playing 2000 bits ahead of X, so at buffer offset
// OFF the correlation peak must appear at lag OFF. All set-up and read-out
// goes over the CAMAC dataway: for each case the parameter words are
// written, one integration period (one frame) is let pass with the old
// set-up, and the results of the next period are read after its LAM.
// Cases: plain cross-correlation; one bit shift with its 90 deg jump
// (the peak moves from the real part at lag 3 to the imaginary part at
// lag 2); a 90 deg start phase; pulsar gating; a non-zero fringe rate with
// acceleration; X autocorrelation; the internal test generator. Y frame 4
// has a parity error, X frame 6 a bad CRC. Each mechanism is counted and
// one that never happened is a failure.
module tb_correlator_module;
  import mk3_pkg::*;

  logic rst = 1;
  logic xclk = 0, yclk = 0;
  always #5 xclk = ~xclk;
  initial begin #3; forever #5 yclk = ~yclk; end

  logic xbit, ybit;
  localparam logic [51:0] T0 = 52'h0_1981_0405_0000;
  localparam logic [63:0] AUX = 64'h00C0_FFEE_0000_0102;
  tape_source #(.AUX(AUX), .T0(T0), .START_BYTE(2000), .CRC_FRAME(6))
    xs (.clk(xclk), .en(1'b1), .bit_out(xbit));
  tape_source #(.AUX(AUX), .T0(T0), .START_BYTE(2250), .PERR_FRAME(4), .PERR_BYTE(900))
    ys (.clk(yclk), .en(1'b1), .bit_out(ybit));

  logic [7:0] trk_data, trk_clk;
  assign trk_data = {6'b0, ybit, xbit};
  assign trk_clk  = {6'b0, yclk, xclk};

  logic cam_n = 0, cam_s1 = 0, cam_s2 = 0, cam_c = 0, cam_z = 0, cam_b = 0;
  logic [4:0] cam_f = 0;
  logic [3:0] cam_a = 0;
  logic [23:0] cam_w = 0, cam_r;
  logic cam_l, cam_x, cam_q;

  correlator_module dut (.rst(rst), .trk_data(trk_data), .trk_clk(trk_clk),
    .x_sel(3'd0), .y_sel(3'd1), .cam_n, .cam_f, .cam_a, .cam_w, .cam_r,
    .cam_s1, .cam_s2, .cam_c, .cam_z, .cam_b, .cam_l, .cam_x, .cam_q);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- CAMAC dataway cycles ----
  task automatic cycle(input logic [4:0] f, input logic [3:0] a, input word_t w,
                       output word_t r, output logic q, output logic x);
    cam_n = 1; cam_f = f; cam_a = a; cam_w = w; cam_b = 1;
    repeat (6) @(posedge xclk);
    cam_s1 = 1; repeat (6) @(posedge xclk);
    r = cam_r; q = cam_q; x = cam_x;
    cam_s1 = 0; repeat (2) @(posedge xclk);
    cam_s2 = 1; repeat (6) @(posedge xclk);
    cam_s2 = 0; repeat (2) @(posedge xclk);
    cam_n = 0; cam_b = 0; repeat (6) @(posedge xclk);
  endtask
  task automatic wr(input int addr, input word_t w);
    word_t r; logic q, x;
    cycle(5'(16 + addr / 16), 4'(addr % 16), w, r, q, x);
    chk(q && x, "write accepted");
  endtask
  function automatic word_t mkctrl(int off, bit test_en = 0, bit jneg = 0, bit down = 0,
                                   bit pulsar = 0, bit auto_y = 0, bit auto_m = 0, int shift = 0);
    ctrl_t c;
    c = '0;
    c.bit_offset = 12'(off); c.test_en = test_en; c.jump_neg = jneg; c.delay_down = down;
    c.pulsar = pulsar; c.auto_y = auto_y; c.auto_mode = auto_m; c.rate_shift = 3'(shift);
    return word_t'(c);
  endfunction

  word_t R [MEM_WORDS];
  task automatic wait_lam_and_read();
    word_t r; logic q, x;
    @(posedge xclk iff cam_l);
    repeat (4) @(posedge xclk);
    cycle(5'd8, 4'd0, 0, r, q, x);                 // test LAM
    chk(q, "F8 answers Q while LAM is set");
    for (int i = RES_BASE; i < RES_BASE + NRES; i++) begin
      cycle(5'(i / 16), 4'(i % 16), 0, r, q, x);
      R[i] = r;
    end
    cycle(5'd10, 4'd0, 0, r, q, x);                // clear LAM
    cycle(5'd8, 4'd0, 0, r, q, x);
    chk(!q && !cam_l, "LAM cleared by F10");
  endtask

  function automatic int res(int i); return int'(R[RES_BASE + i]); endfunction
  function automatic bit near(int v, int n, real frac, real tol);
    return (n > 0) && (real'(v) / real'(n) >= frac - tol) && (real'(v) / real'(n) <= frac + tol);
  endfunction

  // set parameters, let the current period pass, read the next one
  task automatic run_case(word_t ph0, word_t rate, word_t acc, word_t ctrl, word_t t1, word_t t2,
                          word_t per);
    wr(W_PHASE0, ph0); wr(W_RATE, rate); wr(W_ACCEL, acc); wr(W_CTRL, ctrl);
    wr(W_T1, t1); wr(W_T2, t2); wr(W_PER, per);
    wait_lam_and_read();      // period running when the words were written
    wait_lam_and_read();      // first period with the new words
  endtask

  int n_cross = 0, n_shift = 0, n_pulsar = 0, n_auto = 0, n_test = 0, n_rate = 0,
      n_parity = 0, n_crc = 0, n_lam = 0, n_phase = 0;
  logic [51:0] prev_xt = 0;
  int prev_yflags = 0;

  localparam word_t NEVER = 24'hFFFFFF;
  localparam int OFF = 3;

  task automatic check_common(string tag);
    logic [51:0] xt, yt;
    logic [63:0] xa;
    n_lam++;
    xt = {R[RES_BASE + R_XTIME][3:0], R[RES_BASE + R_XTIME + 1], R[RES_BASE + R_XTIME + 2]};
    yt = {R[RES_BASE + R_YTIME][3:0], R[RES_BASE + R_YTIME + 1], R[RES_BASE + R_YTIME + 2]};
    xa = {R[RES_BASE + R_XTIME + 3][15:0], R[RES_BASE + R_XTIME + 4], R[RES_BASE + R_XTIME + 5]};
    chk(xa == AUX, {tag, ": X aux word"});
    chk(yt == xt + 1, {tag, ": Y time one frame ahead of X"});
    if (prev_xt != 0) chk(xt == prev_xt + 2, {tag, ": X time steps by two frames per case"});
    prev_xt = xt;
    if (R[RES_BASE + R_STAT][21]) n_crc++;   // X header CRC flag
    chk(R[RES_BASE + R_STAT][23] && R[RES_BASE + R_STAT][22], {tag, ": both headers seen"});
    chk(R[RES_BASE + R_STAT][21] == (xt == T0 + 6), {tag, ": X CRC flag only in frame 6"});
    // Y leads by 250 bytes = 2000 decoded bits
    chk(res(R_LATCH) >= 1990 && res(R_LATCH) <= 2010, {tag, ": latched Y count"});
    chk(res(R_PCX + 2) > 19000 && near(res(R_PCX), res(R_PCX + 2), 0.5, 0.03) &&
        near(res(R_PCX + 1), res(R_PCX + 2), 0.5, 0.03), {tag, ": X phase-cal counts"});
    chk(res(R_ERR) == 160, {tag, ": X flagged bits = header"});
    if (res(R_ERR + 1) > 162) n_parity++;
  endtask

  initial begin
    repeat (20) @(posedge xclk);
    rst = 0;
    // 1. cross-correlation, phase 0: all in the real part at lag OFF
    run_case(0, 0, 0, mkctrl(OFF), NEVER, 0, 0);
    check_common("cross");
    chk(res(R_NRE) > 19000 && res(R_NIM) == 0, "cross: sin blank at phase 0");
    chk(near(res(R_RE + OFF), res(R_NRE), 1.0, 0.01), "cross: peak at lag OFF");
    for (int k = 0; k < 8; k++) if (k != OFF)
      chk(near(res(R_RE + k), res(R_NRE), 0.5, 0.03), "cross: off-peak lags ~ 0.5");
    n_cross++;

    // 2. one bit shift at bit 6000 with a +90 deg jump
    run_case(0, 0, 0, mkctrl(OFF), 6000, 0, 0);
    check_common("shift");
    chk(res(R_NRE) > 5500 && res(R_NRE) < 6000, "shift: real part until the shift");
    chk(res(R_NIM) > 13500 && res(R_NIM) < 14001, "shift: imaginary part after it");
    chk(near(res(R_RE + OFF), res(R_NRE), 1.0, 0.01), "shift: real peak at lag OFF");
    chk(near(res(R_IM + OFF - 1), res(R_NIM), 1.0, 0.01), "shift: imaginary peak at lag OFF-1");
    chk((R[RES_BASE + R_STAT] & 24'hFF) != 0, "shift: status shows a shift");
    if (near(res(R_IM + OFF - 1), res(R_NIM), 1.0, 0.01)) n_shift++;

    // 3. start phase 90 deg: cos blank, sin +1
    run_case(24'h400000, 0, 0, mkctrl(OFF), NEVER, 0, 0);
    check_common("phase90");
    chk(res(R_NRE) == 0 && res(R_NIM) > 19000, "phase90: cos blank");
    chk(near(res(R_IM + OFF), res(R_NIM), 1.0, 0.01), "phase90: imaginary peak at lag OFF");
    n_phase++;

    // 4. pulsar window 2000 <= bit < 12000
    run_case(0, 0, 0, mkctrl(OFF, .pulsar(1)), 2000, 12000, 0);
    check_common("pulsar");
    chk(res(R_NRE) == 10000, "pulsar: exactly the window is processed");
    chk(res(R_RE + OFF) == 10000, "pulsar: full correlation inside the window");
    if (res(R_NRE) == 10000) n_pulsar++;

    // 5. fringe rate 2^20 units (1/256 cycle per bit), with acceleration
    run_case(0, 24'h100000, 24'h000100, mkctrl(OFF), NEVER, 0, 0);
    check_common("rate");
    chk(near(res(R_NRE), 19840, 0.75, 0.03) && near(res(R_NIM), 19840, 0.75, 0.03),
        "rate: a quarter of the bits blanked");
    chk(near(res(R_RE + OFF), res(R_NRE), 0.5, 0.03), "rate: rotation averages the real peak");
    if (res(R_NIM) > 0 && res(R_NRE) < 19000) n_rate++;

    // 6. X autocorrelation
    run_case(0, 0, 0, mkctrl(OFF, .auto_m(1)), NEVER, 0, 0);
    check_common("auto");
    chk(res(R_NRE) == 19840 && res(R_NIM) == 19840, "auto: unflagged X bits");
    chk(res(R_RE) == res(R_NRE), "auto: lag 0 is exact");
    for (int k = 1; k < 8; k++) chk(near(res(R_RE + k), res(R_NRE), 0.5, 0.03), "auto: lag k");
    chk(near(res(R_IM + 7), res(R_NRE), 0.5, 0.03), "auto: lag 15");
    n_auto++;

    // 7. internal test generator, buffer offset 5
    run_case(0, 0, 0, mkctrl(5, .test_en(1)), NEVER, 0, 0);
    check_common("test");
    chk(near(res(R_RE + 5), res(R_NRE), 1.0, 0.01), "test: generator peak at lag 5");
    chk(near(res(R_RE + 3), res(R_NRE), 0.5, 0.05), "test: tape correlation gone");
    n_test++;

    chk(n_cross > 0, "mechanism: cross-correlation");
    chk(n_shift > 0, "mechanism: bit shift with phase jump");
    chk(n_phase > 0, "mechanism: start phase");
    chk(n_pulsar > 0, "mechanism: pulsar gate");
    chk(n_rate > 0, "mechanism: fringe rotation");
    chk(n_auto > 0, "mechanism: autocorrelation");
    chk(n_test > 0, "mechanism: test generator");
    chk(n_parity > 0, "mechanism: Y parity flag");
    chk(n_crc > 0, "mechanism: X CRC error");
    chk(n_lam > 0, "mechanism: LAM service");
    $display("mechanisms: cross %0d shift %0d phase %0d pulsar %0d rate %0d auto %0d test %0d parity %0d crc %0d lam %0d",
             n_cross, n_shift, n_phase, n_pulsar, n_rate, n_auto, n_test, n_parity, n_crc, n_lam);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (22500 * 24) @(posedge xclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
