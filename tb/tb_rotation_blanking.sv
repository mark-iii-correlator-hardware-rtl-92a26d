// tb_rotation_blanking -- all 64 input combinations against +-1/0 arithmetic.
module tb_rotation_blanking;
  logic x, xf, cn, cb, sn, sb, xc, xcb, xs, xsb;
  int checks = 0, failures = 0;
  rotation_blanking dut (.x, .x_flag(xf), .cosp_neg(cn), .cosp_blank(cb), .sinp_neg(sn),
    .sinp_blank(sb), .x_cos(xc), .cos_blank(xcb), .x_sin(xs), .sin_blank(xsb));
  initial begin
    for (int v = 0; v < 64; v++) begin
      int xv, cv, sv, pc, ps;
      {x, xf, cn, cb, sn, sb} = 6'(v);
      #1;
      xv = x ? 1 : -1;
      cv = cb ? 0 : (cn ? -1 : 1);
      sv = sb ? 0 : (sn ? -1 : 1);
      pc = xf ? 0 : xv * cv;
      ps = xf ? 0 : xv * sv;
      checks += 2;
      if ((pc == 0) != xcb || (pc != 0 && (xc ? 1 : -1) != pc)) failures++;
      if ((ps == 0) != xsb || (ps != 0 && (xs ? 1 : -1) != ps)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
