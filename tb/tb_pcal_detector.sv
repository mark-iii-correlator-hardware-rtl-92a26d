// tb_pcal_detector -- a square-wave tone with noise against random
// reference signs; counts compared with a software tally per period.
module tb_pcal_detector;
  logic clk = 0, rst = 1, dv = 0, bopp = 0, d = 0, flag = 0, cos_neg = 0, sin_neg = 0;
  logic [22:0] c_res, s_res, n_res;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  pcal_detector dut (.*);
  initial begin
    int ec = 0, es = 0, en = 0, pc, ps, pn; bit pend = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 6; p++) begin
      for (int b = 0; b < 2000; ) begin
        @(negedge clk);
        if (pend) begin
          checks += 3;
          if (c_res != 23'(pc)) failures++;
          if (s_res != 23'(ps)) failures++;
          if (n_res != 23'(pn)) failures++;
          pend = 0;
        end
        dv = ($urandom % 5) != 0;
        if (b == 0 && !dv) continue;
        bopp = dv && b == 0;
        cos_neg = ((b / 4) % 4 == 1) || ((b / 4) % 4 == 2); sin_neg = ((b / 4) % 4 >= 2);
        d = ($urandom % 3 == 0) ? 1'($urandom) : !cos_neg;
        flag = ($urandom % 10 == 0);
        #1;
        if (dv) begin
          if (bopp) begin
            if (p > 0) begin
pc = ec; ps = es; pn = en; pend = 1;
            end
            ec = 0; es = 0; en = 0;
          end
          if (!flag) begin
            en++;
            if ((d ? 1 : -1) * (cos_neg ? -1 : 1) > 0) ec++;
            if ((d ? 1 : -1) * (sin_neg ? -1 : 1) > 0) es++;
          end
          b++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
