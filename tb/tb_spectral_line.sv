// tb_spectral_line -- two full-size modules staggered in delay to cover 16
// complex lags, as spectral-line processing does with many modules.
//
// Both modules get the same X and Y tracks (the same noise, Y 2000 bits
// ahead) and share one dataway, with separate N and L and wired-OR R, X and
// Q. The true delay puts the correlation peak at buffer offset 11, which is
// out of reach of one module's lags 0..7. Module A gets offset 11 and covers
// combined lags 0..7; module B gets offset 11 - 8 = 3 and covers combined
// lags 8..15. The 16 combined real lags must show the full-frame peak at lag
// 11 (module B's lag 3) and about half agreement everywhere else. Periods
// are one frame; all sizes are the defaults.
module tb_spectral_line;
  import mk3_pkg::*;

  logic rst = 1;
  logic xclk = 0, yclk = 0;
  always #5 xclk = ~xclk;
  initial begin #3; forever #5 yclk = ~yclk; end

  localparam logic [51:0] T0 = 52'h0_1981_0405_0000;
  logic xbit, ybit;
  tape_source #(.T0(T0), .START_BYTE(2000)) xs (.clk(xclk), .en(1'b1), .bit_out(xbit));
  tape_source #(.T0(T0), .START_BYTE(2250)) ys (.clk(yclk), .en(1'b1), .bit_out(ybit));

  logic [1:0]  cam_n = '0;
  logic cam_s1 = 0, cam_s2 = 0, cam_b = 0;
  logic [4:0]  cam_f = 0;
  logic [3:0]  cam_a = 0;
  logic [23:0] cam_w = 0, cam_r;
  logic [23:0] r_m [2];
  logic [1:0]  l_m, x_m, q_m;
  assign cam_r = r_m[0] | r_m[1];

  for (genvar m = 0; m < 2; m++) begin : g_mod
    correlator_module dut (.rst(rst), .trk_data({6'b0, ybit, xbit}), .trk_clk({6'b0, yclk, xclk}),
      .x_sel(3'd0), .y_sel(3'd1), .cam_n(cam_n[m]), .cam_f, .cam_a, .cam_w, .cam_r(r_m[m]),
      .cam_s1, .cam_s2, .cam_c(1'b0), .cam_z(1'b0), .cam_b, .cam_l(l_m[m]), .cam_x(x_m[m]),
      .cam_q(q_m[m]));
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cycle(input int st, input logic [4:0] f, input logic [3:0] a, input word_t w,
                       output word_t r, output logic q);
    cam_n = 2'(1) << st; cam_f = f; cam_a = a; cam_w = w; cam_b = 1;
    repeat (6) @(posedge xclk);
    cam_s1 = 1; repeat (6) @(posedge xclk);
    r = cam_r; q = |q_m;
    cam_s1 = 0; repeat (2) @(posedge xclk);
    cam_s2 = 1; repeat (6) @(posedge xclk);
    cam_s2 = 0; repeat (2) @(posedge xclk);
    cam_n = '0; cam_b = 0; repeat (6) @(posedge xclk);
  endtask

  word_t R [2][MEM_WORDS];
  task automatic wait_lam_and_read(int st);
    word_t r; logic q;
    @(posedge xclk iff l_m[st]);
    for (int i = RES_BASE; i < RES_BASE + NRES; i++) begin
      cycle(st, 5'(i / 16), 4'(i % 16), 0, r, q);
      R[st][i] = r;
    end
    cycle(st, 5'd10, 4'd0, 0, r, q);
  endtask

  task automatic setup(int st, int off);
    word_t r; logic q;
    ctrl_t c;
    c = '0; c.bit_offset = 12'(off);
    cycle(st, 5'd10, 4'd0, 0, r, q);           // drop a LAM left from earlier periods
    cycle(st, 5'd16, 4'(W_CTRL), word_t'(c), r, q);
    chk(q, "control word accepted");
    cycle(st, 5'd16, 4'(W_T1), 24'hFFFFFF, r, q);
    chk(q, "T1 word accepted");
  endtask

  localparam int UNF  = int'((FRAME_BYTES - HDR_BYTES) * 8);   // 19840
  localparam int PEAK = 11;

  initial begin
    int lag [16];
    repeat (20) @(posedge xclk);
    rst = 0;
    setup(0, PEAK);
    setup(1, PEAK - int'(NLAGS));
    wait_lam_and_read(0);             // period running while the words were written
    wait_lam_and_read(0);             // module A, new offset
    wait_lam_and_read(1);             // module B, same period
    for (int k = 0; k < 8; k++) begin
      lag[k]     = int'(R[0][RES_BASE + R_RE + k]);
      lag[k + 8] = int'(R[1][RES_BASE + R_RE + k]);
    end
    for (int k = 0; k < 16; k++) begin
      if (k == PEAK) chk(lag[k] == UNF, "peak: every unflagged bit agrees at combined lag 11");
      else chk(lag[k] > 9300 && lag[k] < 10500, "other combined lags ~ half agreement");
    end
    chk(R[0][RES_BASE + R_XTIME + 2] == R[1][RES_BASE + R_XTIME + 2],
        "both modules report the same period");
    $display("combined lags: %p", lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (22500 * 8) @(posedge xclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
