// input_select -- picks one of the eight track inputs of the module.
//
// Each module is wired to eight data/clock pairs (two tracks from each of
// four tape drives) and takes X and Y independently from any of them; this
// is the selector for one stream. The select is static set-up (a
// switch or set-up register), so the clock multiplexer never switches while
// running. Combinational.
// Eight inputs per module follow the document; the static select is this
// design's choice.
module input_select (
  input  logic [7:0] trk_data,
  input  logic [7:0] trk_clk,
  input  logic [2:0] sel,
  output logic       data,
  output logic       clk
);
  assign data = trk_data[sel];
  assign clk  = trk_clk[sel];
endmodule
