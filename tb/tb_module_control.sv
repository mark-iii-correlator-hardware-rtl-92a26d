// tb_module_control -- dataway cycles with slow strobes: X and Q for
// accepted commands, one mem_we per write cycle (none without N or B, or to
// a result word), LAM set/test/clear/disable/enable, C clearing the LAM and
// Z giving one init pulse.
module tb_module_control;
  import mk3_pkg::*;
  logic clk = 0, rst = 1, n = 0, c = 0, z = 0, b = 0, s1 = 0, s2 = 0;
  logic [4:0] f = 0; logic [3:0] a = 0;
  logic [5:0] addr; logic rd, wr, tl, cl, dl, el, valid, lam_set = 0, l, x, q, mem_we, init;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nwe = 0, ninit = 0;
  camac_decode dec (.f, .a, .addr, .rd, .wr, .test_lam(tl), .clr_lam(cl), .dis_lam(dl), .en_lam(el), .valid);
  module_control dut (.clk, .rst, .n, .c, .z, .b, .s1, .s2, .addr, .rd, .wr, .test_lam(tl),
    .clr_lam(cl), .dis_lam(dl), .en_lam(el), .valid, .lam_set, .l, .x, .q, .mem_we, .init);
  always @(posedge clk) if (!rst) begin nwe += mem_we; ninit += init; end
  task automatic cyc(input logic nn, input int ff, input int aa, input logic bb,
                     input logic cc = 0, input logic zz = 0, output logic xq, output logic qq);
    n = nn; f = 5'(ff); a = 4'(aa); b = bb; c = cc; z = zz;
    repeat (4) @(negedge clk); s1 = 1; repeat (5) @(negedge clk); xq = x; qq = q; s1 = 0;
    repeat (2) @(negedge clk); s2 = 1; repeat (5) @(negedge clk); s2 = 0;
    repeat (3) @(negedge clk); n = 0; b = 0; c = 0; z = 0; repeat (3) @(negedge clk);
  endtask
  task automatic ok(bit cond); checks++; if (!cond) failures++; endtask
  initial begin
    logic xq, qq; int w0;
    repeat (3) @(negedge clk); rst = 0;
    w0 = nwe; cyc(1, 16, 3, 1, .xq(xq), .qq(qq)); ok(xq && qq && nwe == w0 + 1);
    w0 = nwe; cyc(1, 16, 12, 1, .xq(xq), .qq(qq)); ok(xq && !qq && nwe == w0);   // result word
    w0 = nwe; cyc(0, 16, 3, 1, .xq(xq), .qq(qq)); ok(!xq && !qq && nwe == w0);   // not addressed
    w0 = nwe; cyc(1, 16, 3, 0, .xq(xq), .qq(qq)); ok(nwe == w0);                 // no B
    cyc(1, 1, 5, 1, .xq(xq), .qq(qq)); ok(xq && qq);                             // read
    cyc(1, 7, 5, 1, .xq(xq), .qq(qq)); ok(!xq && !qq);                           // unused F
    cyc(1, 8, 0, 1, .xq(xq), .qq(qq)); ok(!qq && !l);                            // no LAM yet
    @(negedge clk); lam_set = 1; @(negedge clk); lam_set = 0;
    ok(l);
    cyc(1, 8, 0, 1, .xq(xq), .qq(qq)); ok(qq);
    cyc(1, 24, 0, 1, .xq(xq), .qq(qq)); ok(!l);                                  // disable
    cyc(1, 26, 0, 1, .xq(xq), .qq(qq)); ok(l);                                   // enable
    cyc(1, 10, 0, 1, .xq(xq), .qq(qq)); ok(!l);                                  // clear
    @(negedge clk); lam_set = 1; @(negedge clk); lam_set = 0; ok(l);
    cyc(0, 0, 0, 1, .cc(1), .xq(xq), .qq(qq)); ok(!l);                           // C clears
    cyc(0, 0, 0, 1, .zz(1), .xq(xq), .qq(qq)); ok(ninit == 1);                   // Z inits
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
