// tb_camac_decode -- all 32 function codes and 16 subaddresses against the
// function code table.
module tb_camac_decode;
  logic [4:0] f; logic [3:0] a; logic [5:0] addr;
  logic rd, wr, tl, cl, dl, el, valid;
  int checks = 0, failures = 0;
  camac_decode dut (.f, .a, .addr, .rd, .wr, .test_lam(tl), .clr_lam(cl), .dis_lam(dl),
                    .en_lam(el), .valid);
  initial begin
    for (int fi = 0; fi < 32; fi++) for (int ai = 0; ai < 16; ai++) begin
      bit erd, ewr;
      f = 5'(fi); a = 4'(ai); #1;
      erd = fi <= 3; ewr = fi >= 16 && fi <= 19;
      checks++;
      if (rd != erd || wr != ewr || tl != (fi == 8) || cl != (fi == 10) || dl != (fi == 24) ||
          el != (fi == 26) || valid != (erd || ewr || fi == 8 || fi == 10 || fi == 24 || fi == 26))
        failures++;
      if (erd || ewr) begin checks++; if (addr != 6'((fi % 4) * 16 + ai)) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
