// tb_x_bit_counter -- short records (bor every 50 bits), 3 then 1 records
// per period; checks every count output and the bopp positions.
module tb_x_bit_counter;
  logic clk = 0, rst = 1, dv = 0, bor = 0;
  logic [9:0] nrec = 2;
  logic [14:0] bit_in_rec; logic [9:0] rec_in_per; logic [23:0] bit_in_per;
  logic bopp, running;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  x_bit_counter dut (.clk, .rst, .dv, .bor, .nrec_m1_new(nrec), .bit_in_rec, .rec_in_per,
                     .bit_in_per, .bopp, .running);
  initial begin
    int b = 7, r = -1, pb = 0, plen = 3, nbopp = 0, nper = 0, pend = 3;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      dv = ($urandom % 9) != 0;
      bor = 0;
      if (dv) begin
        b = (b + 1) % 50;
        bor = (b == 0);
      end
      #1;
      if (dv) begin
        bit e_bopp;
        e_bopp = 0;
        if (bor) begin
          if (r < 0 || r == plen - 1) begin e_bopp = 1; r = 0; plen = pend; pb = 0; end
          else r++;
        end
        if (r >= 0) begin
          checks += 4;
          if (bit_in_rec != 15'(b)) failures++;
          if (rec_in_per != 10'(r)) failures++;
          if (bit_in_per != 24'(pb)) failures++;
          pb++;
          if (e_bopp) nbopp++;
        end
      end
      if (i == 2500) begin nrec = 0; pend = 1; end
    end
    checks++; if (nbopp < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
