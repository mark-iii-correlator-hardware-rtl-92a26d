// correlator_module -- one Mark III style VLBI correlator module.
//
// Cross-correlates one X track with one Y track. Each input is the data and
// clock reproduced from a tape track; the X track clock runs the module, so
// it processes at whatever speed the tapes play. The Y stream is decoded on
// its own clock and written into a 4000-bit buffer; the X side reads it back
// at the a priori bit offset, which absorbs the tape drives' misalignment.
// The X stream is fringe-rotated with a three-level quadrature model and
// correlated against the Y stream at 8 lags. Within a period the Y delay can
// step one bit at a time, each step going with a 90 degree phase jump of
// the rotator. Phase-cal detectors, error counters and the Y bit count
// latched at the period start complete the results. The host talks to the
// module through a CAMAC dataway and a 64-word buffer: it writes 7
// parameter words that take effect at the next period start (BOPP) and
// reads the results of the last period when the LAM tells it to.
//
// Clocks: the selected X track clock (x_clk) and Y track clock (y_clk).
// Only the Y decoder, the Y bit counter and the buffer's write port use
// y_clk. rst must be held for a few cycles of both clocks. The CAMAC
// signals are synchronised to x_clk; a dataway cycle must last several
// x_clk periods.
//
// X pipeline: stage 1 is the decoder output, the X bit counter and the
// buffer read address; stage 2 (one clock later, when the buffer data is
// out) holds everything else. Integration periods start at X frame
// boundaries and last 1 to 512 frames.
//
// Block structure and signal names follow the module's block diagram; the
// two-stage pipeline, the clock-domain crossings and the word map are
// this design's.
module correlator_module
  import mk3_pkg::*;
(
  input  logic        rst,
  // tape inputs: two tracks from each of four drives
  input  logic [7:0]  trk_data,
  input  logic [7:0]  trk_clk,
  input  logic [2:0]  x_sel,
  input  logic [2:0]  y_sel,
  // CAMAC dataway
  input  logic        cam_n,
  input  logic [4:0]  cam_f,
  input  logic [3:0]  cam_a,
  input  logic [23:0] cam_w,
  output logic [23:0] cam_r,
  input  logic        cam_s1,
  input  logic        cam_s2,
  input  logic        cam_c,
  input  logic        cam_z,
  input  logic        cam_b,
  output logic        cam_l,
  output logic        cam_x,
  output logic        cam_q
);
  // ---------------- clocks and resets ----------------
  logic x_clk, y_clk, x_in, y_in;
  input_select u_xsel (.trk_data, .trk_clk, .sel(x_sel), .data(x_in), .clk(x_clk));
  input_select u_ysel (.trk_data, .trk_clk, .sel(y_sel), .data(y_in), .clk(y_clk));

  logic init, init_y, x_rst, y_rst;
  assign x_rst = rst || init;
  pulse_sync u_init_sync (.src_clk(x_clk), .src_rst(rst), .pulse_in(init),
                          .dst_clk(y_clk), .dst_rst(rst), .pulse_out(init_y));
  assign y_rst = rst || init_y;

  // ---------------- host parameters ----------------
  word_t params [NPARAM];
  ctrl_t ctrl;
  per_t  per;
  assign ctrl = ctrl_t'(params[W_CTRL]);
  assign per  = per_t'(params[W_PER]);

  // ---------------- X decoder, stage 1 ----------------
  logic x_dv, x_d, x_f, x_bor, x_twr, x_crc, x_lock;
  logic [TIME_BITS-1:0] x_time;
  logic [AUX_BITS-1:0]  x_aux;
  logic [15:0] x_par;
  frame_decoder u_xdec (.clk(x_clk), .rst(x_rst), .din(x_in), .dv(x_dv), .dout(x_d),
    .dflag(x_f), .bor(x_bor), .twr(x_twr), .time_word(x_time), .aux_word(x_aux),
    .crc_err(x_crc), .locked(x_lock), .par_errs(x_par));

  logic x_dt;
  test_generator u_xtest (.clk(x_clk), .rst(x_rst), .dv(x_dv), .bor(x_bor),
    .en(ctrl.test_en), .d(x_d), .d_out(x_dt));

  logic [14:0] x_bit_rec;
  logic [9:0]  x_rec;
  logic [23:0] x_bit_per;
  logic        bopp1, x_run;
  x_bit_counter u_xcnt (.clk(x_clk), .rst(x_rst), .dv(x_dv), .bor(x_bor),
    .nrec_m1_new(per.nrec_m1), .bit_in_rec(x_bit_rec), .rec_in_per(x_rec),
    .bit_in_per(x_bit_per), .bopp(bopp1), .running(x_run));

  logic [11:0] raddr;
  bit_offset_counter u_boff (.clk(x_clk), .rst(x_rst), .dv(x_dv), .bopp(bopp1),
    .offset_new(ctrl.bit_offset), .raddr(raddr));

  // ---------------- Y side (y_clk) ----------------
  logic y_dv, y_d, y_f, y_bor, y_twr, y_crc, y_lock;
  logic [TIME_BITS-1:0] y_time;
  logic [AUX_BITS-1:0]  y_aux;
  logic [15:0] y_par;
  frame_decoder u_ydec (.clk(y_clk), .rst(y_rst), .din(y_in), .dv(y_dv), .dout(y_d),
    .dflag(y_f), .bor(y_bor), .twr(y_twr), .time_word(y_time), .aux_word(y_aux),
    .crc_err(y_crc), .locked(y_lock), .par_errs(y_par));

  logic [1:0] ytest_s;      // test enable into the Y domain
  always_ff @(posedge y_clk) ytest_s <= {ytest_s[0], ctrl.test_en};
  logic y_dt;
  test_generator u_ytest (.clk(y_clk), .rst(y_rst), .dv(y_dv), .bor(y_bor),
    .en(ytest_s[1]), .d(y_d), .d_out(y_dt));

  logic        y_we;
  logic [11:0] waddr;
  logic [14:0] y_bit_frame, y_gray;
  y_bit_counter u_ycnt (.clk(y_clk), .rst(y_rst), .dv(y_dv), .bor(y_bor),
    .we(y_we), .waddr(waddr), .bit_in_frame(y_bit_frame), .count_gray(y_gray));

  logic yb, ybf;
  y_buffer_memory u_ybuf (.wclk(y_clk), .we(y_we), .waddr(waddr), .wdata(y_dt), .wflag(y_f),
    .rclk(x_clk), .re(x_dv), .raddr(raddr), .rdata(yb), .rflag(ybf));

  logic y_twr_x;
  pulse_sync u_ytwr_sync (.src_clk(y_clk), .src_rst(y_rst), .pulse_in(y_twr),
                          .dst_clk(x_clk), .dst_rst(x_rst), .pulse_out(y_twr_x));

  // Y status into the X domain: lock through two flops; the parity-error
  // total changes only at a Y frame end, so it is taken at the Y time-word
  // strobe, 20 bytes later, when it is stable.
  logic [1:0]  ylock_s;
  logic [15:0] y_par_x;
  always_ff @(posedge x_clk) begin
    if (x_rst) begin
      ylock_s <= '0; y_par_x <= '0;
    end else begin
      ylock_s <= {ylock_s[0], y_lock};
      if (y_twr_x) y_par_x <= y_par;
    end
  end

  // ---------------- stage 2 (x_clk) ----------------
  logic        dv2, x2, xf2, bopp2;
  logic [23:0] bit_per2;
  always_ff @(posedge x_clk) begin
    if (x_rst) begin
      dv2 <= 1'b0; x2 <= 1'b0; xf2 <= 1'b1; bopp2 <= 1'b0; bit_per2 <= '0;
    end else begin
      dv2 <= x_dv && x_run || bopp1;
      x2  <= x_dt; xf2 <= x_f; bopp2 <= bopp1; bit_per2 <= x_bit_per;
    end
  end

  logic t1, dt_t2, pulsar;
  gate_store u_gate (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2), .bit_in_per(bit_per2),
    .t1_new(params[W_T1]), .t2_new(params[W_T2]), .pulsar_new(ctrl.pulsar),
    .t1(t1), .dt_t2(dt_t2), .pulsar(pulsar));

  logic cn, cb, sn, sb;
  logic [PHASE_W-1:0] phase;
  fringe_rate_generator u_frg (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2),
    .phase0_new(params[W_PHASE0]), .rate_new({ctrl.rate_sign, params[W_RATE]}),
    .accel_new(params[W_ACCEL]), .shift_new(ctrl.rate_shift),
    .cos_neg(cn), .cos_blank(cb), .sin_neg(sn), .sin_blank(sb), .phase(phase));

  logic cpn, cpb, spn, spb;
  logic [3:0] nshift;
  mode_selector u_mode (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2),
    .jump_neg_new(ctrl.jump_neg), .pulsar(pulsar), .t1(t1), .dt_t2(dt_t2),
    .cos_neg(cn), .cos_blank(cb), .sin_neg(sn), .sin_blank(sb),
    .cosp_neg(cpn), .cosp_blank(cpb), .sinp_neg(spn), .sinp_blank(spb), .nshift(nshift));

  logic xc, xcb, xs, xsb;
  rotation_blanking u_rot (.x(x2), .x_flag(xf2), .cosp_neg(cpn), .cosp_blank(cpb),
    .sinp_neg(spn), .sinp_blank(spb), .x_cos(xc), .cos_blank(xcb), .x_sin(xs), .sin_blank(xsb));

  logic yd, ydf;
  logic [3:0] tap;
  programmable_delay u_pdel (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2),
    .delay_down_new(ctrl.delay_down), .pulsar(pulsar), .t1(t1), .dt_t2(dt_t2),
    .y(yb), .y_flag(ybf), .yd(yd), .yd_flag(ydf), .tap(tap));

  logic [ACC_W-1:0] re_res [NLAGS];
  logic [ACC_W-1:0] im_res [NLAGS];
  logic [ACC_W-1:0] nre, nim;
  correlator u_corr (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2),
    .auto_mode_new(ctrl.auto_mode), .auto_y_new(ctrl.auto_y),
    .x_cos(xc), .cos_blank(xcb), .x_sin(xs), .sin_blank(xsb),
    .x(x2), .x_flag(xf2), .y(yd), .y_flag(ydf),
    .re_res(re_res), .im_res(im_res), .nre_res(nre), .nim_res(nim));

  logic pcn, psn;
  pcal_generator u_pcg (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2),
    .qlen_m1_new(per.pcal_qlen), .quad0_new(per.pcal_quad0), .cos_neg(pcn), .sin_neg(psn));

  logic [ACC_W-1:0] pcx_c, pcx_s, pcx_n, pcy_c, pcy_s, pcy_n;
  pcal_detector u_pcx (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2), .d(x2), .flag(xf2),
    .cos_neg(pcn), .sin_neg(psn), .c_res(pcx_c), .s_res(pcx_s), .n_res(pcx_n));
  pcal_detector u_pcy (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2), .d(yb), .flag(ybf),
    .cos_neg(pcn), .sin_neg(psn), .c_res(pcy_c), .s_res(pcy_s), .n_res(pcy_n));

  logic [ACC_W-1:0] e_xf, e_yf, e_x1, e_y1;
  error_counters u_err (.clk(x_clk), .rst(x_rst), .dv(dv2), .bopp(bopp2),
    .x(x2), .x_flag(xf2), .y(yd), .y_flag(ydf),
    .xflag_res(e_xf), .yflag_res(e_yf), .xones_res(e_x1), .yones_res(e_y1));

  // shift count and delay tap as they stood on the last bit of the period
  logic [7:0] live_q, stat_q;
  always_ff @(posedge x_clk) begin
    if (x_rst) begin
      live_q <= '0; stat_q <= '0;
    end else if (dv2) begin
      live_q <= {nshift, tap};
      if (bopp2) stat_q <= live_q;
    end
  end

  logic [14:0] ylatch;
  latch_count u_latch (.clk(x_clk), .rst(x_rst), .bopp(bopp2), .count_gray(y_gray), .latched(ylatch));

  // ---------------- results, scanner, host buffer ----------------
  word_t res [R_XTIME];
  always_comb begin
    for (int k = 0; k < NLAGS; k++) begin
      res[R_RE + k] = word_t'(re_res[k]);
      res[R_IM + k] = word_t'(im_res[k]);
    end
    res[R_NRE]     = word_t'(nre);
    res[R_NIM]     = word_t'(nim);
    res[R_PCX]     = word_t'(pcx_c);
    res[R_PCX + 1] = word_t'(pcx_s);
    res[R_PCX + 2] = word_t'(pcx_n);
    res[R_PCY]     = word_t'(pcy_c);
    res[R_PCY + 1] = word_t'(pcy_s);
    res[R_PCY + 2] = word_t'(pcy_n);
    res[R_ERR]     = word_t'(e_xf);
    res[R_ERR + 1] = word_t'(e_yf);
    res[R_ERR + 2] = word_t'(e_x1);
    res[R_ERR + 3] = word_t'(e_y1);
    res[R_PARX]    = word_t'(x_par);
    res[R_PARY]    = word_t'(y_par_x);
    res[R_LATCH]   = word_t'(ylatch);
    res[R_STAT]    = word_t'({x_lock, ylock_s[1], stat_q});
  end

  logic       s_we, s_done;
  logic [5:0] s_addr;
  word_t      s_wdata;
  scanner u_scan (.clk(x_clk), .rst(x_rst), .bopp(bopp2), .xtwr(x_twr), .ytwr(y_twr_x),
    .x_time(x_time), .y_time(y_time), .x_aux(x_aux), .y_aux(y_aux),
    .x_crc_err(x_crc), .y_crc_err(y_crc), .res(res),
    .we(s_we), .addr(s_addr), .wdata(s_wdata), .done(s_done));

  logic [5:0] c_addr;
  logic c_rd, c_wr, c_tl, c_cl, c_dl, c_el, c_valid, c_we;
  camac_decode u_cdec (.f(cam_f), .a(cam_a), .addr(c_addr), .rd(c_rd), .wr(c_wr),
    .test_lam(c_tl), .clr_lam(c_cl), .dis_lam(c_dl), .en_lam(c_el), .valid(c_valid));

  module_control u_mctl (.clk(x_clk), .rst(rst), .n(cam_n), .c(cam_c), .z(cam_z), .b(cam_b),
    .s1(cam_s1), .s2(cam_s2), .addr(c_addr), .rd(c_rd), .wr(c_wr), .test_lam(c_tl),
    .clr_lam(c_cl), .dis_lam(c_dl), .en_lam(c_el), .valid(c_valid), .lam_set(s_done),
    .l(cam_l), .x(cam_x), .q(cam_q), .mem_we(c_we), .init(init));

  word_t c_rdata;
  camac_buffer u_cbuf (.clk(x_clk), .rst(x_rst), .a_addr(c_addr), .a_we(c_we), .a_wdata(cam_w),
    .a_rdata(c_rdata), .b_we(s_we), .b_addr(s_addr), .b_wdata(s_wdata), .params(params));

  assign cam_r = (cam_n && c_rd) ? c_rdata : '0;

endmodule
