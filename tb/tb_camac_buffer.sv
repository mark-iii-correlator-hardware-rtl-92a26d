// tb_camac_buffer -- host writes reach only the parameter words, scanner
// writes only the result words; every word read back; parameter outputs
// follow the memory; reset clears it.
module tb_camac_buffer;
  import mk3_pkg::*;
  logic clk = 0, rst = 1, a_we = 0, b_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0; word_t a_wdata = 0, b_wdata = 0, a_rdata;
  word_t params [NPARAM];
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  camac_buffer dut (.*);
  word_t m [64];
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    foreach (m[i]) m[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_we = 1'($urandom); a_addr = 6'($urandom); a_wdata = word_t'($urandom);
      b_we = 1'($urandom); b_addr = 6'($urandom); b_wdata = word_t'($urandom);
      if (a_we && a_addr < NPARAM) m[a_addr] = a_wdata;
      if (b_we && b_addr >= RES_BASE) m[b_addr] = b_wdata;
      @(negedge clk); a_we = 0; b_we = 0; a_addr = 6'($urandom); #1;
      checks++; if (a_rdata != m[a_addr]) failures++;
      for (int k = 0; k < NPARAM; k++) begin checks++; if (params[k] != m[k]) failures++; end
    end
    @(negedge clk); rst = 1; @(negedge clk); rst = 0; a_addr = 6'd9; #1;
    checks++; if (a_rdata != 0 || params[0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
