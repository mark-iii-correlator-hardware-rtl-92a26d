// module_control -- CAMAC dataway handshake of the correlator module.
//
// The dataway is asynchronous to the module clock, so B, S1, S2, C and Z
// pass two synchronising flip-flops and act on their rising edges; a
// dataway cycle lasts about a microsecond, many module clocks. N (station
// select) with a valid function gives X (command accepted) at once; Q is
// high for an accepted read, a write to a parameter word, F8 while the LAM
// is pending, and for the LAM commands. At the S1 edge of a write cycle
// (N, B and a write function) mem_we pulses; at the S2 edge, F10 clears,
// F24 disables and F26 enables the LAM. C with S2 clears the LAM, Z with S2
// pulses init to re-initialise the module. lam_set (results ready after
// each integration period) sets the LAM; L is the pending, enabled LAM.
// The signal names are the block diagram's; their use follows the CAMAC
// convention as this design reads it.
module module_control
  import mk3_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       n, c, z, b, s1, s2,
  input  logic [5:0] addr,
  input  logic       rd, wr, test_lam, clr_lam, dis_lam, en_lam, valid,
  input  logic       lam_set,
  output logic       l,
  output logic       x,
  output logic       q,
  output logic       mem_we,
  output logic       init
);
  logic [2:0] s1_s, s2_s;   // [0] first stage, [2] previous
  logic [1:0] b_s, c_s, z_s;
  logic       lam_p, lam_en;
  logic       s1_rise, s2_rise, wr_ok;

  assign s1_rise = s1_s[1] && !s1_s[2];
  assign s2_rise = s2_s[1] && !s2_s[2];
  assign wr_ok   = wr && (addr < 6'(NPARAM));
  assign x       = n && valid;
  assign q       = n && (rd || wr_ok || (test_lam && lam_p) || clr_lam || dis_lam || en_lam);
  assign l       = lam_p && lam_en;

  always_ff @(posedge clk) begin
    mem_we <= 1'b0;
    init   <= 1'b0;
    if (rst) begin
      s1_s <= '0; s2_s <= '0; b_s <= '0; c_s <= '0; z_s <= '0;
      lam_p <= 1'b0; lam_en <= 1'b1;
    end else begin
      s1_s <= {s1_s[1:0], s1};
      s2_s <= {s2_s[1:0], s2};
      b_s  <= {b_s[0], b};
      c_s  <= {c_s[0], c};
      z_s  <= {z_s[0], z};
      if (lam_set) lam_p <= 1'b1;
      if (s1_rise && n && b_s[1] && wr_ok) mem_we <= 1'b1;
      if (s2_rise) begin
        if (n && clr_lam) lam_p <= 1'b0;
        if (n && dis_lam) lam_en <= 1'b0;
        if (n && en_lam)  lam_en <= 1'b1;
        if (c_s[1])       lam_p <= 1'b0;
        if (z_s[1])       init <= 1'b1;
      end
    end
  end
endmodule
