// tb_fringe_rate_generator -- phase, rate, acceleration and resolution
// shift against a 64-bit software phase model, and the three-level cos/sin
// against the real cosine evaluated at the centre of each 22.5 deg sector
// (+1 above cos 67.5 deg, -1 below its negative, 0 between).
module tb_fringe_rate_generator;
  logic clk = 0, rst = 1, dv = 0, bopp = 0;
  logic [23:0] phase0_new = 0; logic signed [24:0] rate_new = 0; logic signed [23:0] accel_new = 0;
  logic [2:0] shift_new = 0;
  logic cos_neg, cos_blank, sin_neg, sin_blank; logic [23:0] phase;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  fringe_rate_generator dut (.*);
  function automatic int level(real ang);
    real c = $cos(ang);
    return c > 0.3826834 ? 1 : (c < -0.3826834 ? -1 : 0);
  endfunction
  initial begin
    longint ph, rt, ac; int sh;
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 12; p++) begin
      phase0_new = 24'($urandom);
      rate_new   = 25'($urandom);
      if (p == 0) rate_new = 0;
      accel_new  = 24'($urandom);
      shift_new  = 3'(p % 8);
      ph = longint'(phase0_new) << 4; rt = longint'(rate_new) <<< 24; ac = longint'(accel_new);
      sh = int'(shift_new);
      for (int i = 0; i < 3000; ) begin
        @(negedge clk);
        dv = ($urandom % 9) != 0;
        bopp = dv && (i == 0);
        if (i == 0 && !dv) continue;
        #1;
        if (dv) begin
          int sec, ec, es;
          real cen;
          sec = int'((ph >> 24) & 15);
          cen = (real'(sec) + 0.5) * 3.14159265358979 / 8.0;
          ec = level(cen); es = level(cen - 3.14159265358979 / 2.0);
          checks += 3;
          if (phase != 24'(ph >> 4)) failures++;
          if (cos_blank != (ec == 0) || (ec != 0 && cos_neg != (ec < 0))) failures++;
          if (sin_blank != (es == 0) || (es != 0 && sin_neg != (es < 0))) failures++;
          ph = (ph + ((rt >>> 24) << sh)) & 64'hFFFFFFF;
          rt = rt + ac;
          i++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
