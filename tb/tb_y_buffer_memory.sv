// tb_y_buffer_memory -- full 4000-bit buffer: random bits and byte flags
// written on one clock, read back on an unrelated clock one cycle after
// the address, including the last address.
module tb_y_buffer_memory;
  logic wclk = 0, rclk = 0, we = 0, wdata = 0, wflag = 0, re = 0, rdata, rflag;
  logic [11:0] waddr = 0, raddr = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  int checks = 0, failures = 0;
  y_buffer_memory dut (.*);
  logic md [4000]; logic mf [500];
  initial begin
    for (int a = 0; a < 4000; a++) begin
      @(negedge wclk);
      we = 1; waddr = 12'(a); wdata = 1'($urandom);
      if (a % 8 == 0) wflag = ($urandom % 4 == 0);
      md[a] = wdata; mf[a / 8] = wflag;
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int a = (i < 8) ? 3992 + i : $urandom % 4000;
      @(negedge rclk); re = 1; raddr = 12'(a);
      @(negedge rclk); re = ($urandom % 2 == 0); raddr = 12'($urandom % 4000);
      checks++;
      if (rdata != md[a] || rflag != mf[a / 8]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
