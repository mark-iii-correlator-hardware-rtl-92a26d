// tb_programmable_delay -- random Y bits and flags through the delay while
// shift events move the tap up (or down) one bit at a time, at most 15
// times per period; output compared with the bit history.
module tb_programmable_delay;
  logic clk = 0, rst = 1, dv = 0, bopp = 0, delay_down_new = 0, pulsar = 0, t1 = 0, dt_t2 = 0;
  logic y = 0, y_flag = 0, yd, yd_flag; logic [3:0] tap;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, maxtap = 0;
  programmable_delay dut (.*);
  logic hy [$]; logic hf [$];
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 12; p++) begin
      automatic bit down = (p % 2 == 1); automatic bit P = (p % 3 == 2); automatic int tp = down ? 15 : 0, n = 0;
      for (int b = 0; b < 500; ) begin
        @(negedge clk);
        dv = ($urandom % 6) != 0;
        if (b == 0 && !dv) continue;
        bopp = dv && b == 0; delay_down_new = down; pulsar = P;
        y = 1'($urandom); y_flag = ($urandom % 7 == 0);
        t1 = dv && b == 20; dt_t2 = dv && b > 20 && ($urandom % 12 == 0);
        #1;
        if (dv) begin
          hy.push_front(y); hf.push_front(y_flag);
          if (hy.size() > 20) begin void'(hy.pop_back()); void'(hf.pop_back()); end
          if (hy.size() > 16) begin
            checks += 3;
            if (yd != hy[tp] || yd_flag != hf[tp]) failures++;
            if (tap != 4'(tp)) failures++;
            checks--;
          end
          if (!P && (t1 || dt_t2) && n < 15) begin n++; tp = down ? tp - 1 : tp + 1; end
          if (tp > maxtap) maxtap = tp;
          b++;
        end
      end
    end
    checks++; if (maxtap != 15) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
