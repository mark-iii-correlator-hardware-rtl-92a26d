// tb_bit_offset_counter -- offset loaded at bopp, then one step per bit,
// wrapping from 3999 to 0.
module tb_bit_offset_counter;
  logic clk = 0, rst = 1, dv = 0, bopp = 0; logic [11:0] offset_new = 0, raddr;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, wraps = 0;
  bit_offset_counter dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 6; p++) begin
      automatic int e = (p == 0) ? 3990 : $urandom % 4000;
      for (int b = 0; b < 3000; ) begin
        @(negedge clk);
        dv = ($urandom % 9) != 0;
        if (b == 0 && !dv) continue;
        bopp = dv && b == 0;
        offset_new = bopp ? 12'(e) : 12'($urandom % 4000);
        #1;
        if (dv) begin
          checks++; if (raddr != 12'(e)) failures++;
          e = (e + 1) % 4000; if (e == 0) wraps++;
          b++;
        end
      end
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
