// tb_mode_selector -- random rotation levels and shift events. In normal
// mode the output must equal (cos + j sin) * (+-j)^n with n the shifts so
// far (at most 15, counted from the bit after each shift); in pulsar mode
// both outputs are blanked outside T1 <= bit < T2.
module tb_mode_selector;
  logic clk = 0, rst = 1, dv = 0, bopp = 0, jump_neg_new = 0, pulsar = 0, t1 = 0, dt_t2 = 0;
  logic cos_neg = 0, cos_blank = 0, sin_neg = 0, sin_blank = 0;
  logic cosp_neg, cosp_blank, sinp_neg, sinp_blank; logic [3:0] nshift;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  mode_selector dut (.*);
  function automatic int lv(logic n, logic b); return b ? 0 : (n ? -1 : 1); endfunction
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 16; p++) begin
      automatic int n = 0, T1, T2; automatic bit neg = (p % 2 == 1); automatic bit P = (p % 4 == 2); automatic bit open = 0;
      T1 = 5 + $urandom % 20; T2 = T1 + 1 + $urandom % 100;
      for (int b = 0; b < 400; ) begin
        @(negedge clk);
        dv = ($urandom % 5) != 0;
        if (b == 0 && !dv) continue;
        bopp = dv && b == 0; jump_neg_new = neg; pulsar = P;
        {cos_neg, cos_blank, sin_neg, sin_blank} = 4'($urandom);
        if (P) begin t1 = dv && b == T1; dt_t2 = dv && b == T2; end
        else begin t1 = dv && b == T1; dt_t2 = dv && b > T1 && ($urandom % 8 == 0); end
        #1;
        if (dv) begin
          int c, s, rc, rs, tc, q;
          c = lv(cos_neg, cos_blank); s = lv(sin_neg, sin_blank);
          rc = c; rs = s;
          q = neg ? (4 - (n % 4)) % 4 : n % 4;
          for (int k = 0; k < q; k++) begin tc = rc; rc = -rs; rs = tc; end
          if (P) begin
            if (b == T1) open = 1;
            if (b == T2) open = 0;
            if (!open) begin rc = 0; rs = 0; end
          end
          checks += 3;
          if (lv(cosp_neg, cosp_blank) != rc) failures++;
          if (lv(sinp_neg, sinp_blank) != rs) failures++;
          if (nshift != 4'(n)) failures++;
          if (!P && (t1 || dt_t2) && n < 15) n++;
          b++;
        end
      end
    end
    @(negedge clk); t1 = 0; dt_t2 = 0; dv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
