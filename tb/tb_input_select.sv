// tb_input_select -- every select value with random track data and clocks.
module tb_input_select;
  logic [7:0] d, c; logic [2:0] sel; logic data, clk;
  int checks = 0, failures = 0;
  input_select dut (.trk_data(d), .trk_clk(c), .sel, .data, .clk);
  initial begin
    for (int it = 0; it < 200; it++) begin
      d = 8'($urandom); c = 8'($urandom); sel = 3'(it % 8);
      #1;
      checks++; if (data !== ((d >> sel) & 1'b1) || clk !== ((c >> sel) & 1'b1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
