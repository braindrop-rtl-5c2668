// tb_tag_fifo: drives both push ports and the pop port with random traffic
// on a small tag set (so that merges are frequent) and keeps a reference
// queue of {tag, count} that applies the same folding rule (fold into the
// newest word when the queue holds at least two words, the tag matches and
// the count stays in [-128, 127]). Every popped word is compared with the
// reference, as are the ready signals (port a priority, back-pressure when
// full). Runs at DEPTH=16 so that the full condition is reached, with
// phases of heavy pushing and heavy popping.
module tb_tag_fifo;
  import braindrop_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic a_valid = 0, a_ready, a_neg = 0, b_valid = 0, b_ready, b_neg = 0;
  logic [10:0] a_tag = 0, b_tag = 0;
  logic out_valid, out_ready = 0, merged, full;
  fifo_entry_t out_data;
  logic [4:0] level;
  int checks = 0, failures = 0;
  int q_tag [$], q_cnt [$];
  int n_merge = 0, n_full = 0, n_pop = 0, n_cancel = 0;
  int push_prob = 50, pop_prob = 50;

  tag_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    bit do_push, fold, p_neg, exp_a_ready, exp_b_ready, can;
    int p_tag, nc, sz;
    sz = q_tag.size();
    // what the reference expects for port a's delta (or b's if a is idle)
    p_tag = a_valid ? int'(a_tag) : int'(b_tag);
    p_neg = a_valid ? a_neg : b_neg;
    can = 0; nc = 0;
    if (sz >= 2 && q_tag[sz-1] == p_tag) begin
      nc = q_cnt[sz-1] + (p_neg ? -1 : 1);
      can = (nc <= 127 && nc >= -128);
    end
    exp_a_ready = (sz < DEPTH) || can;
    exp_b_ready = !a_valid && exp_a_ready;
    checks++;
    if (a_ready != exp_a_ready || b_ready != exp_b_ready) begin
      failures++; $display("FAIL ready a=%b/%b b=%b/%b size=%0d", a_ready, exp_a_ready, b_ready, exp_b_ready, sz);
    end
    if (full) n_full++;
    do_push = (a_valid && a_ready) || (b_valid && b_ready);
    fold = do_push && can;
    if (fold) begin q_cnt[sz-1] = nc; n_merge++; if (nc == 0) n_cancel++; end
    checks++;
    if (merged != fold) begin failures++; $display("FAIL merged flag"); end
    if (out_valid && out_ready) begin
      checks++; n_pop++;
      if (sz == 0 || int'(out_data.tag) != q_tag[0] || int'(out_data.count) != q_cnt[0] || !out_data.dirty) begin
        failures++; $display("FAIL pop got %0d/%0d exp %0d/%0d", out_data.tag, out_data.count, q_tag[0], q_cnt[0]);
      end
      void'(q_tag.pop_front()); void'(q_cnt.pop_front());
    end
    if (do_push && !fold) begin q_tag.push_back(p_tag); q_cnt.push_back(p_neg ? -1 : 1); end
  end

  always @(negedge clk) if (rst_n) begin
    a_valid   = ($urandom_range(0, 99) < push_prob);
    b_valid   = ($urandom_range(0, 99) < push_prob);
    a_tag     = 11'($urandom_range(0, 2));
    b_tag     = 11'($urandom_range(0, 2));
    a_neg     = ($urandom_range(0, 3) == 0);
    b_neg     = ($urandom_range(0, 3) == 0);
    out_ready = ($urandom_range(0, 99) < pop_prob);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    push_prob = 90; pop_prob = 10;
    repeat (2000) @(posedge clk);
    push_prob = 10; pop_prob = 90;
    repeat (2000) @(posedge clk);
    push_prob = 0; pop_prob = 100;
    repeat (50) @(posedge clk);
    checks++;
    if (n_merge == 0 || n_full == 0 || n_pop < 100 || n_cancel == 0) begin
      failures++; $display("FAIL coverage merge=%0d full=%0d pop=%0d cancel=%0d", n_merge, n_full, n_pop, n_cancel);
    end
    checks++;
    if (q_tag.size() != 0 || out_valid) begin failures++; $display("FAIL not drained"); end
    $display("merges=%0d full_cycles=%0d pops=%0d cancels=%0d", n_merge, n_full, n_pop, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
