// pool_action_table (PAT): 64 entries, one per 64-neuron subarray, indexed by
// the subarray field of a soma's address event. Each entry gives the pool's
// weight block in weight memory (as a 64-weight row number) and its first
// accumulator bucket. Programming the PAT divides the 4096-neuron array into
// pools with a granularity of 64 neurons, as the architecture describes; the
// 20-bit word layout is this design's choice.
// Interface: one synchronous read port (data valid the cycle after rd_en) and
// one configuration write port. Contents are zero after reset.
module pool_action_table
  import braindrop_pkg::*;
#(
  parameter int unsigned ENTRIES = SUBARRAYS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rd_en,
  input  logic [$clog2(ENTRIES)-1:0] rd_addr,
  output pat_entry_t                 rd_data,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_addr,
  input  pat_entry_t                 wr_data
);
  pat_entry_t mem [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) mem[i] <= '0;
      rd_data <= '0;
    end else begin
      if (wr_en) mem[wr_addr] <= wr_data;
      if (rd_en) rd_data <= mem[rd_addr];
    end
  end
endmodule
