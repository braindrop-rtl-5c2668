// tb_accum_datapath: programs two pools and one transform into the PAT, WM
// and AM, then sends random spikes and transform requests. A reference model
// in the testbench repeats the bucket walk (weight layout, threshold rule,
// stop bits, sign of transforms) and predicts each output delta, which is
// compared in order with the DUT's. With out_ready held high it checks the
// latency of every request: 1 + 2*buckets + deltas cycles for a spike and
// 2*buckets + deltas for a transform. A second phase toggles out_ready at
// random (stalls) and offers spikes and transforms together to check that
// transforms go first.
module tb_accum_datapath;
  import braindrop_pkg::*;
  logic clk = 0, rst_n = 0;
  logic spk_valid = 0, spk_ready;
  logic [11:0] spk_addr = 0;
  logic xf_valid = 0, xf_ready, xf_neg = 0;
  logic [9:0] xf_am_base = 0;
  logic [15:0] xf_wm_base = 0;
  logic out_valid, out_ready = 1, out_neg;
  logic [18:0] out_gtag;
  logic pat_we = 0, wm_we = 0, am_we = 0;
  logic [5:0] pat_waddr = 0;
  pat_entry_t pat_wdata = '0;
  logic [15:0] wm_waddr = 0;
  logic signed [7:0] wm_wdata = 0;
  logic [9:0] am_waddr = 0;
  am_entry_t am_wdata = '0;
  logic busy;
  int checks = 0, failures = 0;

  accum_datapath dut (.*);
  always #5 clk = ~clk;

  // reference state
  int ref_w [int];
  int st [1024];
  int thr_r [1024];
  bit stop_r [1024];
  int exp_q [$];        // expected {gtag, neg} packed as gtag*2+neg
  int n_out = 0, stalls = 0, xf_first = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr_wm(int a, int w);
    @(negedge clk); wm_we = 1; wm_waddr = 16'(a); wm_wdata = 8'(w); ref_w[a] = w;
    @(negedge clk); wm_we = 0;
  endtask
  task automatic wr_am(int a, int thr, bit stop);
    am_entry_t e;
    e.stop = stop; e.gtag = 19'(a); e.thr = 3'(thr); e.state = '0;
    st[a] = 0; thr_r[a] = thr; stop_r[a] = stop;
    @(negedge clk); am_we = 1; am_waddr = 10'(a); am_wdata = e;
    @(negedge clk); am_we = 0;
  endtask
  task automatic wr_pat(int s, int row, int base);
    @(negedge clk); pat_we = 1; pat_waddr = 6'(s); pat_wdata = '{wm_row: 10'(row), am_base: 10'(base)};
    @(negedge clk); pat_we = 0;
  endtask

  // walk buckets in the reference; returns number of buckets and deltas
  function automatic void ref_walk(int base, int wbase, int step, bit neg, output int nb, output int nd);
    int a = base, wa = wbase, t, s;
    nb = 0; nd = 0;
    forever begin
      int w = ref_w.exists(wa) ? ref_w[wa] : 0;
      if (neg) w = -w;
      t = 1 << (7 + thr_r[a]);
      s = st[a] + w;
      if (s >= t) begin s -= t; exp_q.push_back(a * 2); nd++; end
      else if (s <= -t) begin s += t; exp_q.push_back(a * 2 + 1); nd++; end
      st[a] = s; nb++;
      if (stop_r[a]) break;
      a++; wa += step;
    end
  endfunction

  // output monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    if (!out_ready) stalls++;
    else begin
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected delta %0d", out_gtag); end
      else begin
        automatic int e = exp_q.pop_front();
        if (int'(out_gtag) * 2 + int'(out_neg) != e) begin
          failures++; $display("FAIL delta got %0d/%0d exp %0d/%0d", out_gtag, out_neg, e / 2, e % 2);
        end
      end
    end
  end

  task automatic do_spike(int sub, int idx, int row, int base, bit timed);
    int nb, nd, cyc;
    ref_walk(base, row * 64 + idx, 64, 0, nb, nd);
    @(negedge clk); spk_valid = 1; spk_addr = 12'(sub * 64 + idx);
    @(posedge clk); while (!spk_ready) @(posedge clk);
    #1 spk_valid = 0;
    cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    if (timed) begin
      checks++;
      if (cyc != 1 + 2 * nb + nd) begin failures++; $display("FAIL spike latency %0d exp %0d", cyc, 1 + 2*nb + nd); end
    end
  endtask

  task automatic do_xf(int base, int wb, bit neg, bit timed);
    int nb, nd, cyc;
    ref_walk(base, wb, 1, neg, nb, nd);
    @(negedge clk); xf_valid = 1; xf_am_base = 10'(base); xf_wm_base = 16'(wb); xf_neg = neg;
    @(posedge clk); while (!xf_ready) @(posedge clk);
    #1 xf_valid = 0;
    cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    if (timed) begin
      checks++;
      if (cyc != 2 * nb + nd) begin failures++; $display("FAIL xf latency %0d exp %0d", cyc, 2*nb + nd); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pool A: subarray 3, 4 dimensions, weights rows 10..13, buckets 100..103
    wr_pat(3, 10, 100);
    for (int d = 0; d < 4; d++) begin
      wr_am(100 + d, d % 2, d == 3);
      for (int n = 0; n < 64; n++) wr_wm((10 + d) * 64 + n, int'($urandom_range(0, 255)) - 128);
    end
    // pool B: subarray 5, one dimension
    wr_pat(5, 200, 500);
    wr_am(500, 0, 1);
    for (int n = 0; n < 64; n++) wr_wm(200 * 64 + n, int'($urandom_range(0, 187)) - 60);
    // transform: 3 buckets at 700, column at 40000
    for (int d = 0; d < 3; d++) begin wr_am(700 + d, 0, d == 2); wr_wm(40000 + d, 40 * (d + 1) - 50); end

    // phase 1: one request at a time, out_ready high, latency checked
    for (int k = 0; k < 300; k++) begin
      automatic int r = $urandom_range(0, 2);
      if (r == 0) do_spike(3, $urandom_range(0, 63), 10, 100, 1);
      else if (r == 1) do_spike(5, $urandom_range(0, 63), 200, 500, 1);
      else do_xf(700, 40000, 1'($urandom), 1);
    end
    // phase 2: random stalls
    fork
      begin
        for (int k = 0; k < 200; k++) begin
          if ($urandom_range(0, 1)) do_spike(3, $urandom_range(0, 63), 10, 100, 0);
          else do_xf(700, 40000, 1'($urandom), 0);
        end
      end
      begin
        for (int k = 0; k < 4000; k++) begin @(negedge clk); out_ready = 1'($urandom_range(0, 2) != 0); end
        out_ready = 1;
      end
    join
    // phase 3: spike and transform offered together; transform must win
    @(negedge clk);
    begin
      int nb, nd;
      ref_walk(700, 40000, 1, 0, nb, nd);
      xf_valid = 1; xf_am_base = 700; xf_wm_base = 40000; xf_neg = 0;
      spk_valid = 1; spk_addr = 12'(5 * 64 + 7);
      @(posedge clk); #1;
      checks++;
      xf_valid = 0;
      if (dut.state == dut.S_READ) xf_first++;
      else begin failures++; $display("FAIL transform did not win"); end
      while (busy) begin @(posedge clk); #1; end
      ref_walk(500, 200 * 64 + 7, 64, 0, nb, nd);
      @(posedge clk); while (!spk_ready) @(posedge clk);
      #1 spk_valid = 0;
      while (busy) begin @(posedge clk); #1; end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d deltas missing", exp_q.size()); end
    checks++;
    if (stalls == 0 || n_out < 50) begin failures++; $display("FAIL coverage stalls=%0d outs=%0d", stalls, n_out); end
    $display("outputs=%0d stalls=%0d", n_out, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
