// tb_test_generator -- output against a software LFSR (x^23 + x^18 + 1,
// seed 5A5A5A), restart at bor, pass-through when disabled.
module tb_test_generator;
  logic clk = 0, rst = 1, dv = 0, bor = 0, en = 1, d = 0, dout;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  test_generator dut (.clk, .rst, .dv, .bor, .en, .d, .d_out(dout));
  int unsigned ref_state;
  function automatic int unsigned step(int unsigned s);
    int unsigned fb = ((s >> 22) ^ (s >> 17)) & 1;
    return ((s << 1) | fb) & 32'h7FFFFF;
  endfunction
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int pass = 0; pass < 3; pass++) begin
      ref_state = 32'h5A5A5A;
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        dv = ($urandom % 9) != 0; bor = dv && (i == 0);
        if (i == 0) begin dv = 1; bor = 1; end
        d = 1'($urandom); en = (pass != 1);
        #1;
        checks++;
        if (en ? (dout != ((ref_state >> 22) & 1)) : (dout != d)) failures++;
        if (dv) ref_state = step(ref_state);
      end
    end
    @(negedge clk); dv = 0; bor = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
