// tag_action_table (TAT) memory: 2048 entries, one per local tag address.
// A tag's actions sit in consecutive entries starting at the tag's own
// address and ending at an entry with its stop bit set. Each entry is one of:
// a transform (bucket base in AM and column base in WM), up to two signed
// tap points (synaptic-filter addresses) or a global route (a 19-bit tag sent
// off the core). Entry count follows the architecture; the 29-bit entry
// layout (see braindrop_pkg) is this design's choice.
// Interface: synchronous read (data the cycle after rd_en, held until the
// next read), one configuration write port. Not reset (SRAM).
module tag_action_table
  import braindrop_pkg::*;
#(
  parameter int unsigned ENTRIES = TAT_WORDS
) (
  input  logic                       clk,
  input  logic                       rd_en,
  input  logic [$clog2(ENTRIES)-1:0] rd_addr,
  output tat_entry_t                 rd_data,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_addr,
  input  tat_entry_t                 wr_data
);
  tat_entry_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
