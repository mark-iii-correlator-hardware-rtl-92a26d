// tb_frame_decoder -- self-checking test of frame_decoder.
//
// A tape_source starts in the middle of frame 0 and runs six frames. Frame 2
// has a parity error in byte 100, frame 3 a bad CRC, and frames 4 and 5 no
// sync word, which must drop the lock. Checked: lock is gained, every decoded
// data bit and flag against the source's own hash, bor at the first bit of a
// frame, time/aux words and CRC status at twr, the parity-error count, and
// the 20000-bit frame length.
module tb_frame_decoder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic din, dv, dout, dflag, bor, twr, crc_err, locked;
  logic [51:0] time_word;
  logic [63:0] aux_word;
  logic [15:0] par_errs;
  int checks = 0, failures = 0;

  localparam logic [63:0] AUX = 64'hA5A5_0F0F_1234_5602;
  localparam logic [51:0] T0  = 52'h0_2022_0101_0000;

  tape_source #(.AUX(AUX), .T0(T0), .START_BYTE(1500), .PERR_FRAME(2), .PERR_BYTE(100),
                .CRC_FRAME(3), .NOSYNC_FROM(4)) src (.clk(clk), .en(!rst), .bit_out(din));

  frame_decoder dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int idx = -1, fr = -1, nbor = 0, ntwr = 0, bad_bits = 0, nbits = 0, flagged_data = 0;
  bit was_locked = 0, lost = 0;

  always @(posedge clk) if (!rst) begin
    if (locked) was_locked = 1;
    if (was_locked && !locked) lost = 1;
    if (!locked) idx = -1;
    if (dv) begin
      if (bor) begin
        if (idx >= 0) chk(idx == 20000, "frame length");
        idx = 0; fr = src.frame; nbor++;
      end
      if (idx >= 0) begin
        if (idx < 160) begin
          if (!dflag) bad_bits++;
        end else begin
          automatic logic exp = src.hbit(longint'(fr) * 20000 + idx);
          nbits++;
          if (fr == 2 && idx / 8 == 100) begin
            if (!dflag) bad_bits++;
            flagged_data++;
          end else if (dflag || dout != exp) bad_bits++;
        end
        idx++;
      end
    end
    if (twr) begin
      ntwr++;
      chk(aux_word == AUX, "aux word");
      chk(time_word == T0 + 52'(src.frame), "time word");
      chk(crc_err == (src.frame == 3), "crc status");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (src.frame == 2 && src.pbyte == 200);
    chk(par_errs == 0, "no parity errors before frame 2");
    wait (src.frame == 3 && src.pbyte == 5);
    chk(par_errs == 1, "one parity error after frame 2");
    wait (src.frame == 6 && src.pbyte == 100);
    chk(was_locked, "lock gained");
    chk(lost, "lock lost after two frames without sync");
    chk(nbor == 4, "bor count");
    chk(ntwr == 3, "twr count");
    chk(nbits > 59000, "data bits seen");
    chk(flagged_data == 8, "one byte flagged for parity");
    chk(bad_bits == 0, "decoded bits and flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
