// tb_correlator -- cross and autocorrelation periods with random rotated
// X, blanks and flags; every accumulator, read after the next bopp, is
// compared with a software model that keeps its own bit history.
module tb_correlator;
  logic clk = 0, rst = 1, dv = 0, bopp = 0, auto_mode_new = 0, auto_y_new = 0;
  logic x_cos = 0, cos_blank = 0, x_sin = 0, sin_blank = 0, x = 0, x_flag = 0, y = 0, y_flag = 0;
  logic [22:0] re_res [8]; logic [22:0] im_res [8]; logic [22:0] nre_res, nim_res;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  correlator dut (.*);
  int ere [8], eim [8], enr, eni;
  int pre [8], pim [8], pnr, pni;
  bit pend = 0;
  logic hd [$]; logic hf [$];
  initial begin
    for (int k = 0; k < 16; k++) begin hd.push_back(0); hf.push_back(1); end
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 7; p++) begin
      automatic bit am = (p % 3 == 1), ay = (p == 4);
      for (int b = 0; b < 3000; ) begin
        @(negedge clk);
        dv = ($urandom % 7) != 0;
        if (b == 0 && !dv) continue;
        bopp = dv && b == 0;
        auto_mode_new = am; auto_y_new = ay;
        x = 1'($urandom); y = ($urandom % 4 == 0) ? 1'($urandom) : x;   // correlated
        x_flag = ($urandom % 20 == 0); y_flag = ($urandom % 20 == 0);
        x_cos = ($urandom % 3 == 0) ? ~x : x; x_sin = 1'($urandom);
        cos_blank = ($urandom % 4 == 0); sin_blank = ($urandom % 4 == 0);
        if (pend) begin
          // results of the period that ended at the last bopp
          for (int k = 0; k < 8; k++) begin
            checks += 2;
            if (re_res[k] != 23'(pre[k])) failures++;
            if (im_res[k] != 23'(pim[k])) failures++;
          end
          checks += 2;
          if (nre_res != 23'(pnr) || nim_res != 23'(pni)) failures++;
          if (pnr < 1000) failures++;
          pend = 0;
        end
        #1;
        if (dv) begin
          logic a, af;
          if (bopp) begin
            if (p > 0) begin pre = ere; pim = eim; pnr = enr; pni = eni; pend = 1; end
            foreach (ere[k]) begin ere[k] = 0; eim[k] = 0; end
            enr = 0; eni = 0;
          end
          a = am ? (ay ? y : x) : y; af = am ? (ay ? y_flag : x_flag) : y_flag;
          hd.push_front(a); hf.push_front(af); void'(hd.pop_back()); void'(hf.pop_back());
          for (int k = 0; k < 8; k++) begin
            if (am) begin
              if (!af && !hf[k] && a == hd[k]) ere[k]++;
              if (!af && !hf[k + 8] && a == hd[k + 8]) eim[k]++;
            end else begin
              if (!cos_blank && !hf[k] && x_cos == hd[k]) ere[k]++;
              if (!sin_blank && !hf[k] && x_sin == hd[k]) eim[k]++;
            end
          end
          if (am) begin enr += !af; eni += !af; end
          else begin enr += !cos_blank && !hf[0]; eni += !sin_blank && !hf[0]; end
          b++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
