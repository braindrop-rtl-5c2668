// accumulator_memory (AM): 1024 accumulator buckets of 38 bits each: 15-bit
// signed state, 3-bit threshold code, 19-bit global tag emitted when the
// bucket crosses threshold, and a stop bit marking the last bucket of a list.
// Word size and fields follow the architecture; the port timing is this
// design's choice.
// Interface: synchronous read port (data the cycle after rd_en), one
// datapath write port for state updates and one configuration write port;
// the datapath port wins if both write the same cycle. Not reset (SRAM).
module accumulator_memory
  import braindrop_pkg::*;
#(
  parameter int unsigned WORDS = AM_WORDS
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output am_entry_t                rd_data,
  input  logic                     upd_en,
  input  logic [$clog2(WORDS)-1:0] upd_addr,
  input  am_entry_t                upd_data,
  input  logic                     cfg_en,
  input  logic [$clog2(WORDS)-1:0] cfg_addr,
  input  am_entry_t                cfg_data
);
  am_entry_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (upd_en) mem[upd_addr] <= upd_data;
    else if (cfg_en) mem[cfg_addr] <= cfg_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
