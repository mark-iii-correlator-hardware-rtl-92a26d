// tb_error_counters -- random bits and flags; the four counts of each
// period compared with a software tally.
module tb_error_counters;
  logic clk = 0, rst = 1, dv = 0, bopp = 0, x = 0, x_flag = 0, y = 0, y_flag = 0;
  logic [22:0] xflag_res, yflag_res, xones_res, yones_res;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  error_counters dut (.*);
  initial begin
    int e [4], pe [4]; bit pend = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 6; p++) begin
      for (int b = 0; b < 2000; ) begin
        @(negedge clk);
        if (pend) begin
          checks += 4;
          if (xflag_res != 23'(pe[0])) failures++;
          if (yflag_res != 23'(pe[1])) failures++;
          if (xones_res != 23'(pe[2])) failures++;
          if (yones_res != 23'(pe[3])) failures++;
          pend = 0;
        end
        dv = ($urandom % 5) != 0;
        if (b == 0 && !dv) continue;
        bopp = dv && b == 0;
        x = 1'($urandom); y = ($urandom % 3 == 0); x_flag = ($urandom % 9 == 0); y_flag = ($urandom % 5 == 0);
        #1;
        if (dv) begin
          if (bopp) begin
            if (p > 0) begin
pe = e; pend = 1;
            end
            e = '{0, 0, 0, 0};
          end
          e[0] += x_flag; e[1] += y_flag; e[2] += x && !x_flag; e[3] += y && !y_flag;
          b++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
