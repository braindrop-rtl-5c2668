// tag_fifo: the queue between the accumulators and the tag action table.
// Each 20-bit word holds an 11-bit local tag, a signed 8-bit count of unit
// deltas and a dirty bit (word layout as in the architecture). A new delta
// whose tag equals the tag of the newest queued word (one that is not also
// the oldest, so never a word being read) is folded into that word's count
// instead of taking a new slot; opposite signs cancel. The merge rule, the
// depth of 2048 words (estimated from the FIFO's silicon area) and the
// two-port input are this design's choices.
// Interface: two push ports of single signed deltas, port a (accumulators)
// having priority over port b (host); one pop port presenting the oldest
// word combinationally (first-word fall-through). A push is accepted when
// in_ready is high; a pop when out_valid && out_ready. A popped word's dirty
// bit is cleared. Pointers reset to empty.
module tag_fifo
  import braindrop_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_valid,
  output logic              a_ready,
  input  logic [TAG_W-1:0]  a_tag,
  input  logic              a_neg,
  input  logic              b_valid,
  output logic              b_ready,
  input  logic [TAG_W-1:0]  b_tag,
  input  logic              b_neg,
  output logic              out_valid,
  input  logic              out_ready,
  output fifo_entry_t       out_data,
  output logic              merged,     // a push was folded into the tail word
  output logic              full,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);
  fifo_entry_t mem [DEPTH];
  logic [AW-1:0] head, tail, last;
  logic [AW:0]   cnt;

  logic             push, pop, can_merge, sel_a;
  logic [TAG_W-1:0] p_tag;
  logic             p_neg;
  fifo_entry_t      tail_e;
  logic signed [COUNT_W:0] merged_cnt;

  assign last   = tail - 1'b1;
  assign tail_e = mem[last];
  assign sel_a  = a_valid;
  assign p_tag  = sel_a ? a_tag : b_tag;
  assign p_neg  = sel_a ? a_neg : b_neg;

  always_comb begin
    merged_cnt = (COUNT_W+1)'(tail_e.count) + (p_neg ? -(COUNT_W+1)'(1) : (COUNT_W+1)'(1));
    can_merge  = (cnt >= 2) && tail_e.dirty && (tail_e.tag == p_tag) &&
                 (merged_cnt <= (COUNT_W+1)'(127)) && (merged_cnt >= -(COUNT_W+1)'(128));
  end

  assign full      = (cnt == (AW+1)'(DEPTH));
  assign a_ready   = !full || can_merge;
  assign b_ready   = !a_valid && (!full || can_merge);
  assign push      = (a_valid && a_ready) || (b_valid && b_ready);
  assign out_valid = (cnt != 0);
  assign out_data  = mem[head];
  assign pop       = out_valid && out_ready;
  assign merged    = push && can_merge;
  assign level     = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (pop) begin
        mem[head].dirty <= 1'b0;
        head <= head + 1'b1;
      end
      if (push) begin
        if (can_merge) begin
          mem[last].count <= merged_cnt[COUNT_W-1:0];
        end else begin
          mem[tail] <= '{dirty: 1'b1, tag: p_tag,
                         count: p_neg ? -COUNT_W'(1) : COUNT_W'(1)};
          tail <= tail + 1'b1;
        end
      end
      cnt <= cnt + (AW+1)'(push && !can_merge) - (AW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(DEPTH));
endmodule
