// tb_gate_store -- 40 periods of 120 bits with random T1, dT/T2 and mode;
// t1 and dt_t2 compared with the rule on every bit.
module tb_gate_store;
  logic clk = 0, rst = 1, dv = 0, bopp = 0, pulsar_new = 0, t1, dt_t2, pulsar;
  logic [23:0] bit_in_per = 0, t1_new = 0, t2_new = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nt1 = 0, ndt = 0;
  gate_store dut (.*);
  initial begin
    int T1, T2; bit P;
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 40; p++) begin
      automatic int b = 0;
      t1_new = 24'($urandom % 60); t2_new = 24'((p % 5 == 0) ? 0 : 1 + $urandom % 40);
      pulsar_new = (p % 3 == 1);
      if (pulsar_new) t2_new = t1_new + 24'($urandom % 50);
      T1 = int'(t1_new); T2 = int'(t2_new); P = pulsar_new;
      while (b < 120) begin
        @(negedge clk);
        dv = ($urandom % 4) != 0;
        bopp = dv && (b == 0);
        bit_in_per = 24'(b);
        // the pending words change after bopp: they must not matter
        if (b > 0) begin t1_new = 24'($urandom % 60); t2_new = 24'($urandom % 40); pulsar_new = 1'($urandom); end
        #1;
        if (dv) begin
          bit e1, e2;
          e1 = (b == T1);
          if (P) e2 = (b == T2);
          else e2 = (T2 != 0) && (b > T1) && ((b - T1) % T2 == 0);
          checks += 3;
          if (t1 != e1) failures++;
          if (dt_t2 != e2) failures++;
          if (pulsar != P) failures++;
          nt1 += e1; ndt += e2;
          b++;
        end
      end
    end
    checks++; if (nt1 < 20 || ndt < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
