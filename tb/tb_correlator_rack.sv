// tb_correlator_rack -- end-to-end test of the whole correlator system (six
// crates of fifteen modules) at full size.
//
// Three track pairs carry the same noise, the Y track playing 2000 bits
// ahead of the X track:
//   * drive 0 track 1 (X) and drive 1 track 1 (Y), served by module 1 of crate 1
//     (an odd-track pair: inputs 0 and 2);
//   * drive 2 track 28 (X) and drive 3 track 28 (Y), served by module 14 of crate 6
//     (an even-track pair: inputs 5 and 7);
//   * the floating pair of crate 3, drive 0 line 1 (X) and drive 3 line 0 (Y),
//     served by that crate's floating module 15 (inputs 1 and 6).
// X frame 8 of the first pair has a bad header CRC; Y frame 2 of the second
// pair has a parity error.
// Each case writes a target module's seven parameter words over its own
// crate's dataway, lets the running period pass and reads the next one after
// its LAM. The cases are cross-correlation (peak exactly at the buffer offset),
// one bit shift with its +90 deg jump, a pulsar window, a fringe rate with
// acceleration, X autocorrelation and the test generator. The cases rotate
// over the three target modules. After each case the crate is read with no
// station addressed, which must give R = 0, Q = 0 and X = 0 while the other
// modules run (wired-OR bus). Each mechanism is counted, and one that never
// happened is a failure. One frame per period, all sizes at their defaults.
module tb_correlator_rack;
  import mk3_pkg::*;

  logic rst = 1;
  logic xclk = 0, yclk = 0;
  always #5 xclk = ~xclk;
  initial begin #3; forever #5 yclk = ~yclk; end

  localparam logic [51:0] T0 = 52'h0_1981_0405_0000;
  logic [5:0] xb, yb;
  for (genvar i = 0; i < 3; i++) begin : g_src
    tape_source #(.T0(T0), .START_BYTE(2000), .CRC_FRAME(i == 0 ? 8 : -1))
      xs (.clk(xclk), .en(1'b1), .bit_out(xb[i]));
    tape_source #(.T0(T0), .START_BYTE(2250), .PERR_FRAME(i == 1 ? 2 : -1), .PERR_BYTE(900))
      ys (.clk(yclk), .en(1'b1), .bit_out(yb[i]));
  end

  logic [NTRACK-1:0] drv_data [NDRIVE], drv_clk [NDRIVE];
  logic [1:0] flt_data [NCRATE][NDRIVE], flt_clk [NCRATE][NDRIVE];
  logic [2:0] x_sel [NCRATE][NSLOT], y_sel [NCRATE][NSLOT];
  always_comb begin
    for (int d = 0; d < int'(NDRIVE); d++) begin drv_data[d] = '0; drv_clk[d] = '0; end
    for (int c = 0; c < int'(NCRATE); c++)
      for (int d = 0; d < int'(NDRIVE); d++) begin flt_data[c][d] = '0; flt_clk[c][d] = '0; end
    drv_data[0][0]  = xb[0]; drv_clk[0][0]  = xclk;   // drive 0 track 1
    drv_data[1][0]  = yb[0]; drv_clk[1][0]  = yclk;   // drive 1 track 1
    drv_data[2][27] = xb[1]; drv_clk[2][27] = xclk;   // drive 2 track 28
    drv_data[3][27] = yb[1]; drv_clk[3][27] = yclk;   // drive 3 track 28
    flt_data[2][0][1] = xb[2]; flt_clk[2][0][1] = xclk; // crate 3 floating, drive 0
    flt_data[2][3][0] = yb[2]; flt_clk[2][3][0] = yclk; // crate 3 floating, drive 3
  end
  initial begin
    for (int c = 0; c < int'(NCRATE); c++)
      for (int s = 0; s < int'(NSLOT); s++) begin x_sel[c][s] = 3'd0; y_sel[c][s] = 3'd0; end
    x_sel[0][0]  = 3'd0; y_sel[0][0]  = 3'd2;
    x_sel[5][13] = 3'd5; y_sel[5][13] = 3'd7;
    x_sel[2][14] = 3'd1; y_sel[2][14] = 3'd6;
  end

  logic [NSLOT-1:0] cam_n [NCRATE];
  logic [4:0]  cam_f [NCRATE];
  logic [3:0]  cam_a [NCRATE];
  logic [23:0] cam_w [NCRATE], cam_r [NCRATE];
  logic cam_s1 [NCRATE], cam_s2 [NCRATE], cam_c [NCRATE], cam_z [NCRATE], cam_b [NCRATE];
  logic [NSLOT-1:0] cam_l [NCRATE];
  logic cam_x [NCRATE], cam_q [NCRATE];
  initial
    for (int c = 0; c < int'(NCRATE); c++) begin
      cam_n[c] = '0; cam_f[c] = '0; cam_a[c] = '0; cam_w[c] = '0;
      cam_s1[c] = 0; cam_s2[c] = 0; cam_c[c] = 0; cam_z[c] = 0; cam_b[c] = 0;
    end

  correlator_rack dut (.rst, .drv_data, .drv_clk, .flt_data, .flt_clk, .x_sel, .y_sel,
    .cam_n, .cam_f, .cam_a, .cam_w, .cam_r, .cam_s1, .cam_s2, .cam_c, .cam_z, .cam_b,
    .cam_l, .cam_x, .cam_q);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one dataway cycle in crate cr; st < 0 addresses no station
  task automatic cycle(input int cr, input int st, input logic [4:0] f, input logic [3:0] a,
                       input word_t w, output word_t r, output logic q, output logic x);
    cam_n[cr] = (st < 0) ? '0 : NSLOT'(1) << st;
    cam_f[cr] = f; cam_a[cr] = a; cam_w[cr] = w; cam_b[cr] = 1;
    repeat (6) @(posedge xclk);
    cam_s1[cr] = 1; repeat (6) @(posedge xclk);
    r = cam_r[cr]; q = cam_q[cr]; x = cam_x[cr];
    cam_s1[cr] = 0; repeat (2) @(posedge xclk);
    cam_s2[cr] = 1; repeat (6) @(posedge xclk);
    cam_s2[cr] = 0; repeat (2) @(posedge xclk);
    cam_n[cr] = '0; cam_b[cr] = 0; repeat (6) @(posedge xclk);
  endtask

  word_t R [MEM_WORDS];
  task automatic wait_lam_and_read(int cr, int st);
    word_t r; logic q, x;
    @(posedge xclk iff cam_l[cr][st]);
    for (int i = RES_BASE; i < RES_BASE + NRES; i++) begin
      cycle(cr, st, 5'(i / 16), 4'(i % 16), 0, r, q, x);
      R[i] = r;
    end
    cycle(cr, st, 5'd10, 4'd0, 0, r, q, x);
    chk(!cam_l[cr][st], "LAM cleared");
  endtask
  function automatic int res(int i); return int'(R[RES_BASE + i]); endfunction

  int n_odd = 0, n_even = 0, n_float = 0, n_empty = 0, n_lam = 0;
  int n_cross = 0, n_shift = 0, n_pulsar = 0, n_rate = 0, n_auto = 0, n_test = 0,
      n_parity = 0, n_crc = 0;
  localparam int UNF = int'((FRAME_BYTES - HDR_BYTES) * 8);   // 19840
  localparam word_t NEVER = 24'hFFFFFF;

  function automatic bit near(int v, int n, real frac, real tol);
    return (n > 0) && (real'(v) / real'(n) >= frac - tol) && (real'(v) / real'(n) <= frac + tol);
  endfunction

  // write the parameter words of one module, let the running period pass,
  // read the next one
  task automatic run_case(int cr, int st, string tag, word_t ph0, word_t rate, word_t acc,
                          word_t ctrl, word_t t1, word_t t2);
    word_t r; logic q, x;
    word_t w [NPARAM];
    w = '{ph0, rate, acc, ctrl, t1, t2, 24'd0};
    cycle(cr, st, 5'd10, 4'd0, 0, r, q, x);     // drop a LAM left from earlier periods
    @(posedge xclk iff !cam_l[cr][st]);
    for (int i = 0; i < int'(NPARAM); i++) begin
      cycle(cr, st, 5'd16, 4'(i), w[i], r, q, x);
      chk(q && x, {tag, ": parameter write accepted"});
    end
    wait_lam_and_read(cr, st);
    wait_lam_and_read(cr, st);
    n_lam++;
    cycle(cr, -1, 5'd0, 4'(RES_BASE % 16), 0, r, q, x);
    chk(r == 0 && !q && !x, {tag, ": no station addressed gives R = 0, no Q, no X"});
    if (r == 0 && !q && !x) n_empty++;
    if (R[RES_BASE + R_STAT][21]) n_crc++;
    if (res(R_PARY) > 0) n_parity++;
    $display("%s: X frame %0d", tag,
             {R[RES_BASE + R_XTIME][3:0], R[RES_BASE + R_XTIME + 1], R[RES_BASE + R_XTIME + 2]} - T0);
  endtask
  function automatic word_t mkctrl(int off, bit pulsar = 0, bit auto_m = 0, bit test_en = 0);
    ctrl_t c;
    c = '0; c.bit_offset = 12'(off); c.pulsar = pulsar; c.auto_mode = auto_m; c.test_en = test_en;
    return word_t'(c);
  endfunction

  task automatic check_cross(string tag, int off, output bit good);
    good = (res(R_RE + off) == UNF) && (res(R_NRE) == UNF - off) && (res(R_NIM) == 0);
    chk(good, {tag, ": whole frame agrees at the lag set by the offset, sine blanked"});
    for (int k = 0; k < 8; k++) if (k != off)
      chk(near(res(R_RE + k), res(R_NRE), 0.5, 0.03), {tag, ": off-peak lag ~ 0.5"});
  endtask

  initial begin
    bit g;
    repeat (20) @(posedge xclk);
    rst = 0;
    // crate 1 module 1 (odd pair): cross-correlation at offset 3
    run_case(0, 0, "c1m1 cross", 0, 0, 0, mkctrl(3), NEVER, 0);
    check_cross("c1m1 cross", 3, g);
    if (g) begin n_odd++; n_cross++; end
    // crate 6 module 14 (even pair): one bit shift at bit 6000, +90 deg jump
    run_case(5, 13, "c6m14 shift", 0, 0, 0, mkctrl(5), 6000, 0);
    g = (res(R_NRE) > 5500 && res(R_NRE) < 6000 && res(R_NIM) > 13500 && res(R_NIM) < 14001 &&
         near(res(R_RE + 5), res(R_NRE), 1.0, 0.01) && near(res(R_IM + 4), res(R_NIM), 1.0, 0.01));
    chk(g, "c6m14 shift: real peak at lag 5 before, imaginary at lag 4 after the shift");
    if (g) begin n_even++; n_shift++; end
    // crate 3 floating module: pulsar window 2000 <= bit < 12000
    run_case(2, 14, "c3m15 pulsar", 0, 0, 0, mkctrl(6, .pulsar(1)), 2000, 12000);
    g = (res(R_NRE) == 10000 && res(R_RE + 6) == 10000);
    chk(g, "c3m15 pulsar: exactly the window, fully correlated at lag 6");
    if (g) begin n_float++; n_pulsar++; end
    // crate 1 module 1: fringe rate 1/256 cycle per bit with acceleration
    run_case(0, 0, "c1m1 rate", 0, 24'h100000, 24'h000100, mkctrl(3), NEVER, 0);
    g = near(res(R_NRE), UNF, 0.75, 0.03) && near(res(R_NIM), UNF, 0.75, 0.03) &&
        near(res(R_RE + 3), res(R_NRE), 0.5, 0.03);
    chk(g, "c1m1 rate: a quarter blanked, real peak averaged out");
    if (g) n_rate++;
    // crate 6 module 14: X autocorrelation
    run_case(5, 13, "c6m14 auto", 0, 0, 0, mkctrl(5, .auto_m(1)), NEVER, 0);
    g = (res(R_NRE) == UNF && res(R_RE) == UNF && near(res(R_RE + 1), UNF, 0.5, 0.03) &&
         near(res(R_IM + 7), UNF, 0.5, 0.03));
    chk(g, "c6m14 auto: lag 0 exact, lags 1 and 15 ~ 0.5");
    if (g) n_auto++;
    // crate 3 floating module: internal test generator at offset 5
    run_case(2, 14, "c3m15 test", 0, 0, 0, mkctrl(5, .test_en(1)), NEVER, 0);
    g = near(res(R_RE + 5), res(R_NRE), 1.0, 0.01) && near(res(R_RE + 6), res(R_NRE), 0.5, 0.05);
    chk(g, "c3m15 test: generator peak at lag 5, tape peak at lag 6 gone");
    if (g) n_test++;
    chk(n_odd > 0, "mechanism: odd-track pair");
    chk(n_even > 0, "mechanism: even-track pair");
    chk(n_float > 0, "mechanism: floating module");
    chk(n_empty > 0, "mechanism: empty-station cycle");
    chk(n_lam > 0, "mechanism: station LAM");
    chk(n_cross > 0, "mechanism: cross-correlation");
    chk(n_shift > 0, "mechanism: bit shift with phase jump");
    chk(n_pulsar > 0, "mechanism: pulsar gate");
    chk(n_rate > 0, "mechanism: fringe rotation");
    chk(n_auto > 0, "mechanism: autocorrelation");
    chk(n_test > 0, "mechanism: test generator");
    chk(n_parity > 0, "mechanism: Y parity error counted");
    chk(n_crc > 0, "mechanism: X header CRC error");
    $display("mechanisms: odd %0d even %0d floating %0d empty %0d lam %0d cross %0d shift %0d pulsar %0d rate %0d auto %0d test %0d parity %0d crc %0d",
             n_odd, n_even, n_float, n_empty, n_lam, n_cross, n_shift, n_pulsar, n_rate, n_auto,
             n_test, n_parity, n_crc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (22500 * 30) @(posedge xclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
