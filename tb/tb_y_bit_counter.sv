// tb_y_bit_counter -- 60-bit frames into a 25-bit buffer (both reduced):
// write address = bit mod depth, bit count and its registered Gray code.
module tb_y_bit_counter;
  logic clk = 0, rst = 1, dv = 0, bor = 0, we;
  logic [11:0] waddr; logic [14:0] bit_in_frame, count_gray;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  y_bit_counter #(.DEPTH(25)) dut (.*);
  initial begin
    int b = 30, seen = 0, last = -1;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (last >= 0) begin
        checks++; if (count_gray != 15'((last + 1) ^ ((last + 1) >> 1))) failures++;
      end
      dv = ($urandom % 9) != 0; bor = 0;
      if (dv) begin b = (b + 1) % 60; bor = (b == 0); if (bor) seen = 1; end
      #1;
      if (dv) begin
        checks++; if (we != seen) failures++;
        if (seen) begin
          checks += 2;
          if (waddr != 12'(b % 25)) failures++;
          if (bit_in_frame != 15'(b)) failures++;
          last = b;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
