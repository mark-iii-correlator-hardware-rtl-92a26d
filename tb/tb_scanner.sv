// tb_scanner -- three periods: after each bopp all 44 result words must
// be written once, in order, to words 8..51 with done at the end, and the
// time/aux words must be those of the first X and Y time-word-ready of the
// period before.
module tb_scanner;
  import mk3_pkg::*;
  logic clk = 0, rst = 1, bopp = 0, xtwr = 0, ytwr = 0, x_crc_err = 0, y_crc_err = 0;
  logic [51:0] x_time = 0, y_time = 0; logic [63:0] x_aux = 0, y_aux = 0;
  word_t res [R_XTIME];
  logic we, done; logic [5:0] addr; word_t wdata;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  scanner dut (.*);
  word_t got [64]; int nw;
  always @(posedge clk) if (we) begin got[addr] <= wdata; nw <= nw + 1; end
  initial begin
    logic [51:0] xt_first, yt_first; logic [63:0] xa_first, ya_first;
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 4; p++) begin
      word_t exp [64];
      @(negedge clk);
      foreach (res[i]) res[i] = word_t'($urandom);
      foreach (got[i]) got[i] = 24'hDEAD00;
      nw = 0;
      bopp = 1; @(negedge clk); bopp = 0;
      for (int i = 0; i < R_XTIME; i++) exp[RES_BASE + i] = res[i];
      exp[RES_BASE + R_STAT] = res[R_STAT] | (word_t'({p > 0, p > 0, 1'b0, p > 0}) << 20);
      if (p > 0) begin
        exp[RES_BASE + R_XTIME + 0] = word_t'(xt_first >> 48);
        exp[RES_BASE + R_XTIME + 1] = xt_first[47:24];
        exp[RES_BASE + R_XTIME + 2] = xt_first[23:0];
        exp[RES_BASE + R_XTIME + 3] = xa_first[63:48];
        exp[RES_BASE + R_XTIME + 4] = xa_first[47:24];
        exp[RES_BASE + R_XTIME + 5] = xa_first[23:0];
        exp[RES_BASE + R_YTIME + 0] = word_t'(yt_first >> 48);
        exp[RES_BASE + R_YTIME + 1] = yt_first[47:24];
        exp[RES_BASE + R_YTIME + 2] = yt_first[23:0];
        exp[RES_BASE + R_YTIME + 3] = ya_first[63:48];
        exp[RES_BASE + R_YTIME + 4] = ya_first[47:24];
        exp[RES_BASE + R_YTIME + 5] = ya_first[23:0];
      end
      // done must come after exactly NRES writes
      begin
        automatic int cyc = 0;
        while (!done) begin @(negedge clk); cyc++; end
        checks++; if (cyc != NRES || nw != NRES) failures++;
      end
      for (int i = RES_BASE; i < RES_BASE + R_XTIME; i++) begin checks++; if (got[i] != exp[i]) failures++; end
      if (p > 0) for (int i = RES_BASE + R_XTIME; i < RES_BASE + NRES; i++) begin
        checks++; if (got[i] != exp[i]) failures++;
      end
      // time words during the coming period: keep only the first of each
      for (int k = 0; k < 3; k++) begin
        repeat (5) @(negedge clk);
        x_time = {20'h0, 32'($urandom)} | (52'h1 << 50); x_aux = {32'($urandom), 32'($urandom)};
        y_time = {20'h0, 32'($urandom)} | (52'h1 << 49); y_aux = {32'($urandom), 32'($urandom)};
        y_crc_err = 1;
        if (k == 0) begin xt_first = x_time; xa_first = x_aux; yt_first = y_time; ya_first = y_aux; end
        xtwr = 1; ytwr = 1; @(negedge clk); xtwr = 0; ytwr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
