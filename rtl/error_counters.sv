// error_counters -- per-period data quality counts.
//
// Counts the flagged X bits and flagged (delayed) Y bits, and the unflagged
// bits that are one on each stream, whose ratio to the unflagged total
// shows a sampler bias. Same double buffering at bopp as the correlator.
// The block and its inputs are in the block diagram; what it counts is this
// design's reading of its name and inputs.
module error_counters
  import mk3_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic clk,
  input  logic rst,
  input  logic dv,
  input  logic bopp,
  input  logic x, x_flag,
  input  logic y, y_flag,
  output logic [W-1:0] xflag_res,
  output logic [W-1:0] yflag_res,
  output logic [W-1:0] xones_res,
  output logic [W-1:0] yones_res
);
  logic [W-1:0] a [4];
  logic         inc [4];
  always_comb begin
    inc[0] = x_flag;
    inc[1] = y_flag;
    inc[2] = !x_flag && x;
    inc[3] = !y_flag && y;
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) a[i] <= '0;
      xflag_res <= '0; yflag_res <= '0; xones_res <= '0; yones_res <= '0;
    end else if (dv) begin
      if (bopp) begin
        xflag_res <= a[0]; yflag_res <= a[1]; xones_res <= a[2]; yones_res <= a[3];
        for (int i = 0; i < 4; i++) a[i] <= W'(inc[i]);
      end else begin
        for (int i = 0; i < 4; i++) a[i] <= a[i] + W'(inc[i]);
      end
    end
  end
endmodule
