// pulse_sync -- carries a single-cycle pulse into another clock domain.
//
// The pulse toggles a flip-flop in the source domain; the level passes two
// flip-flops in the destination domain and each change gives one output
// pulse. Pulses must be several destination clocks apart.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic pulse_in,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic pulse_out
);
  logic t;
  logic [2:0] s;
  always_ff @(posedge src_clk) begin
    if (src_rst) t <= 1'b0;
    else if (pulse_in) t <= !t;
  end
  always_ff @(posedge dst_clk) begin
    if (dst_rst) s <= '0;
    else s <= {s[1:0], t};
  end
  assign pulse_out = s[2] ^ s[1];
endmodule
