// correlator_rack -- the correlator system: six identical crates of fifteen
// correlator modules (ninety modules) on one set of tape signals.
//
// Every crate gets all 28 tracks of the four tape drives. Within a crate,
// module k takes track pair (2k-1, 2k), and the floating module takes a
// track pair from each drive chosen in the drives' electronics; there is
// one such floating pair per crate (flt_data[crate][drive]). Which baseline
// and which tracks a crate processes is set by the module selects: for
// 3 baselines / 28 tracks, crate 2b-1 does the odd and crate 2b the even
// tracks of baseline b, each module picking the odd or even track of its
// pair from two drives; for 6 baselines / 14 tracks, crate b does baseline
// b. Each crate has its own CAMAC dataway to the host's branch driver
// (not part of this design); its signals are brought out as ports.
//
// The six crates of fifteen, the shared track signals and the floating
// modules follow the document's system configuration; the port layout is
// this design's.
module correlator_rack
  import mk3_pkg::*;
(
  input  logic        rst,
  input  logic [NTRACK-1:0] drv_data [NDRIVE],
  input  logic [NTRACK-1:0] drv_clk  [NDRIVE],
  input  logic [1:0]  flt_data [NCRATE][NDRIVE],
  input  logic [1:0]  flt_clk  [NCRATE][NDRIVE],
  input  logic [2:0]  x_sel [NCRATE][NSLOT],
  input  logic [2:0]  y_sel [NCRATE][NSLOT],
  // one CAMAC dataway per crate
  input  logic [NSLOT-1:0] cam_n  [NCRATE],
  input  logic [4:0]  cam_f  [NCRATE],
  input  logic [3:0]  cam_a  [NCRATE],
  input  logic [23:0] cam_w  [NCRATE],
  output logic [23:0] cam_r  [NCRATE],
  input  logic        cam_s1 [NCRATE],
  input  logic        cam_s2 [NCRATE],
  input  logic        cam_c  [NCRATE],
  input  logic        cam_z  [NCRATE],
  input  logic        cam_b  [NCRATE],
  output logic [NSLOT-1:0] cam_l [NCRATE],
  output logic        cam_x  [NCRATE],
  output logic        cam_q  [NCRATE]
);
  for (genvar cr = 0; cr < int'(NCRATE); cr++) begin : g_crate
    correlator_crate u_crate (.rst(rst), .drv_data(drv_data), .drv_clk(drv_clk),
      .flt_data(flt_data[cr]), .flt_clk(flt_clk[cr]),
      .x_sel(x_sel[cr]), .y_sel(y_sel[cr]),
      .cam_n(cam_n[cr]), .cam_f(cam_f[cr]), .cam_a(cam_a[cr]), .cam_w(cam_w[cr]),
      .cam_r(cam_r[cr]), .cam_s1(cam_s1[cr]), .cam_s2(cam_s2[cr]), .cam_c(cam_c[cr]),
      .cam_z(cam_z[cr]), .cam_b(cam_b[cr]), .cam_l(cam_l[cr]), .cam_x(cam_x[cr]),
      .cam_q(cam_q[cr]));
  end
endmodule
