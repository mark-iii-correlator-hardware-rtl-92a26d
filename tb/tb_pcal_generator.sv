// tb_pcal_generator -- quarter lengths 1..9 and all start quadrants: the
// cos/sin signs must follow the quadrant sequence, one quadrant per qlen
// bits.
module tb_pcal_generator;
  logic clk = 0, rst = 1, dv = 0, bopp = 0, cos_neg, sin_neg;
  logic [11:0] qlen_m1_new = 0; logic [1:0] quad0_new = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  pcal_generator dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 12; p++) begin
      automatic int L = 1 + p % 9, q0 = p % 4;
      for (int b = 0; b < 200; ) begin
        @(negedge clk);
        dv = ($urandom % 5) != 0;
        if (b == 0 && !dv) continue;
        bopp = dv && b == 0;
        qlen_m1_new = bopp ? 12'(L - 1) : 12'($urandom % 9); quad0_new = bopp ? 2'(q0) : 2'($urandom);
        #1;
        if (dv) begin
          automatic int q = (q0 + b / L) % 4;
          automatic real ang = (real'(q) + 0.5) * 3.14159265358979 / 2.0;
          checks++;
          if (cos_neg != ($cos(ang) < 0) || sin_neg != ($sin(ang) < 0)) failures++;
          b++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
