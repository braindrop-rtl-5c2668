// weight_memory (WM): the core's 64 KB of signed 8-bit weights. A pool's
// decoding matrix and every transform matrix live here; a weight w stands for
// the value w/128 in [-1, 1). Size and weight width follow the architecture;
// the read/write timing is this design's choice.
// Interface: synchronous read (rd_data valid the cycle after rd_en), one
// configuration write port. The array is not reset (it is an SRAM); software
// writes every weight it uses before use.
module weight_memory
  import braindrop_pkg::*;
#(
  parameter int unsigned WORDS = WM_WORDS
) (
  input  logic                        clk,
  input  logic                        rd_en,
  input  logic [$clog2(WORDS)-1:0]    rd_addr,
  output logic signed [WEIGHT_W-1:0]  rd_data,
  input  logic                        wr_en,
  input  logic [$clog2(WORDS)-1:0]    wr_addr,
  input  logic signed [WEIGHT_W-1:0]  wr_data
);
  logic signed [WEIGHT_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
