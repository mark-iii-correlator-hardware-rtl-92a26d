// tb_latch_count -- a Gray-coded count from an unrelated clock; at each
// bopp the latched binary value must be within three counts of the source
// count (two synchroniser stages plus clock skew).
module tb_latch_count;
  logic clk = 0, yclk = 0, rst = 1, bopp = 0; logic [14:0] gray = 0, latched;
  always #5 clk = ~clk;
  always #6 yclk = ~yclk;
  int checks = 0, failures = 0, cnt = 0;
  latch_count dut (.clk, .rst, .bopp, .count_gray(gray), .latched);
  always @(posedge yclk) begin cnt <= (cnt + 1) % 20000; gray <= 15'(((cnt + 1) % 20000) ^ (((cnt + 1) % 20000) >> 1)); end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 60; i++) begin
      int c0, d;
      repeat (50 + $urandom % 400) @(negedge clk);
      c0 = cnt; bopp = 1;
      @(negedge clk); bopp = 0;
      @(negedge clk);
      d = c0 - int'(latched);
      checks++;
      if (d < 0 || d > 3) begin failures++; $display("cnt %0d latched %0d", c0, latched); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
