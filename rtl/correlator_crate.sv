// correlator_crate -- one crate of fifteen correlator modules with its track
// distribution and its CAMAC dataway.
//
// All crates get the same tape signals: tracks 1..28 of each of the four
// tape drives (drv_data[d][t-1]). Module k (k = 1..14, slot index k-1) gets
// tracks 2k-1 and 2k of every drive on its eight inputs, in the order
// input 2d = drive d's odd track and input 2d+1 = drive d's even track, so
// each module can take X and Y from any drive for its track pair. Module 15 is
// the floating module: its eight inputs are one track pair from each drive
// (flt_data[d]), picked by the drives' own electronics, so it can serve any
// track pair.
//
// Dataway: F, A, W, S1, S2, C, Z and B go to every station; each station
// has its own N and L; R, X and Q are wired-OR, because a station that is not
// addressed drives zeros. Timing is the module's: one bit per track clock,
// dataway strobes synchronised in each module.
//
// The fifteen modules per crate, the distribution of track pairs and the
// floating module follow the document's system configuration. The input
// order, the two floating lines per drive and the bus modelling are this
// design's.
module correlator_crate
  import mk3_pkg::*;
(
  input  logic        rst,
  input  logic [NTRACK-1:0] drv_data [NDRIVE],   // tracks 1..28 of drives 0..3
  input  logic [NTRACK-1:0] drv_clk  [NDRIVE],
  input  logic [1:0]  flt_data [NDRIVE],   // floating track pair from each drive
  input  logic [1:0]  flt_clk  [NDRIVE],
  input  logic [2:0]  x_sel [NSLOT],
  input  logic [2:0]  y_sel [NSLOT],
  // CAMAC dataway of the crate
  input  logic [NSLOT-1:0] cam_n,
  input  logic [4:0]  cam_f,
  input  logic [3:0]  cam_a,
  input  logic [23:0] cam_w,
  output logic [23:0] cam_r,
  input  logic        cam_s1,
  input  logic        cam_s2,
  input  logic        cam_c,
  input  logic        cam_z,
  input  logic        cam_b,
  output logic [NSLOT-1:0] cam_l,
  output logic        cam_x,
  output logic        cam_q
);
  logic [23:0]      r_s [NSLOT];
  logic [NSLOT-1:0] x_s, q_s;

  for (genvar k = 0; k < int'(NSLOT); k++) begin : g_slot
    logic [7:0] d, c;
    for (genvar dr = 0; dr < int'(NDRIVE); dr++) begin : g_drv
      if (k < int'(NSLOT) - 1) begin : g_pair
        assign d[2*dr]   = drv_data[dr][2*k];
        assign d[2*dr+1] = drv_data[dr][2*k+1];
        assign c[2*dr]   = drv_clk[dr][2*k];
        assign c[2*dr+1] = drv_clk[dr][2*k+1];
      end else begin : g_float
        assign d[2*dr +: 2] = flt_data[dr];
        assign c[2*dr +: 2] = flt_clk[dr];
      end
    end
    correlator_module u_mod (.rst(rst), .trk_data(d), .trk_clk(c),
      .x_sel(x_sel[k]), .y_sel(y_sel[k]),
      .cam_n(cam_n[k]), .cam_f, .cam_a, .cam_w, .cam_r(r_s[k]),
      .cam_s1, .cam_s2, .cam_c, .cam_z, .cam_b,
      .cam_l(cam_l[k]), .cam_x(x_s[k]), .cam_q(q_s[k]));
  end

  always_comb begin
    cam_r = '0;
    for (int k = 0; k < int'(NSLOT); k++) cam_r |= r_s[k];
  end
  assign cam_x = |x_s;
  assign cam_q = |q_s;
endmodule
