// camac_buffer -- the 64 x 24-bit host buffer memory.
//
// Port A is the CAMAC side: asynchronous read of any word, synchronous
// write (words 0..NPARAM-1 only, the parameter words). Port B is the
// scanner's write port for the result words (RES_BASE and up). The two
// ports never write the same word. The parameter words are also brought
// out in parallel; the units copy them at each bopp, which makes the host
// parameters double-buffered. Cleared by reset.
// The 64 24-bit words are the block diagram's; the word map is this
// design's.
module camac_buffer
  import mk3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  a_addr,
  input  logic        a_we,
  input  word_t       a_wdata,
  output word_t       a_rdata,
  input  logic        b_we,
  input  logic [5:0]  b_addr,
  input  word_t       b_wdata,
  output word_t       params [NPARAM]
);
  word_t mem [MEM_WORDS];
  assign a_rdata = mem[a_addr];
  always_comb for (int i = 0; i < NPARAM; i++) params[i] = mem[i];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < MEM_WORDS; i++) mem[i] <= '0;
    end else begin
      if (a_we && a_addr < 6'(NPARAM)) mem[a_addr] <= a_wdata;
      if (b_we && b_addr >= 6'(RES_BASE)) mem[b_addr] <= b_wdata;
    end
  end
endmodule
