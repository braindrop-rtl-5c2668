// tb_decode_workload: decoding by accumulative thinning on the full-size
// core, the digital half of the function-approximation networks. Two pools
// are programmed through the pool action table:
//   - pool A, 1024 neurons (subarrays 0-15), one output dimension: every
//     subarray points at its own 64-weight row and at bucket 0 (threshold
//     code 2, T = 512, local tag 5). Tag 5's action list routes each delta
//     off the core, so pool A's thinned deltas leave on rt_out after a trip
//     through the tag FIFO and the tag action table;
//   - pool B, 256 neurons (subarrays 16-19), two output dimensions: two
//     weight rows per subarray, buckets 1 and 2 (threshold code 0), global
//     tags with route 4, so their deltas leave directly on acc_out.
// Weights are random 8-bit decoders. All other somas are killed through the
// configuration memory, so the 1280 live somas spike at rates set by the
// bias and their built-in mismatch. The bias is held low while the core
// is configured. The somas then run for a fixed time, then the
// bias is pulled down and the core drains. A reference model replays every
// address event accepted by the accumulator datapath, in order, through the
// two-sided thresholding accumulator with the same weights, and the test
// checks the positive and negative delta counts of every output exactly.
// It also checks that killed somas never spike and that every live
// subarray was decoded; AER collisions (spikes merged while pending) are
// expected because the somas outpace the datapath, and must occur.
module tb_decode_workload;
  import braindrop_pkg::*;

  logic clk = 0, rst_n = 0, analog_tick = 0;
  logic signed [15:0] bias_dac = -16'sd2000;
  logic pat_we = 0, wm_we = 0, am_we = 0, tat_we = 0, cm_we = 0;
  logic [SUB_AW-1:0] pat_waddr = 0;
  pat_entry_t pat_wdata = '0;
  logic [WM_AW-1:0] wm_waddr = 0;
  logic signed [WEIGHT_W-1:0] wm_wdata = 0;
  logic [AM_AW-1:0] am_waddr = 0;
  am_entry_t am_wdata = '0;
  logic [TAG_W-1:0] tat_waddr = 0;
  tat_entry_t tat_wdata = '0;
  logic [TILE_AW-1:0] cm_wtile = 0;
  logic [CM_TILE_BITS-1:0] cm_wdata = '0;
  logic host_valid = 0, host_ready, host_neg = 0;
  logic [TAG_W-1:0] host_tag = 0;
  logic acc_out_valid, acc_out_ready = 1, acc_out_neg;
  logic [GTAG_W-1:0] acc_out_gtag;
  logic rt_out_valid, rt_out_ready = 1, rt_out_neg;
  logic [GTAG_W-1:0] rt_out_gtag;
  logic [NEURONS-1:0] soma_spikes;
  logic fifo_full, fifo_merged, aer_collision, datapath_busy, tat_busy;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  int checks = 0, failures = 0;
  localparam int TICK = 64;

  braindrop_core dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    analog_tick <= (cyc % TICK == TICK - 1);
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- weights and reference ----------------
  int wA[1024];          // pool A weight of neuron s*64+j
  int wB[256][2];        // pool B weights of neuron (s-16)*64+j, dimension i
  int ref_state[3], ref_pos[3], ref_neg[3];
  int out_pos[3], out_neg[3];
  int n_events[64];
  int n_bad = 0, n_dead_spk = 0, n_coll = 0;

  function automatic void ref_add(int b, int w, int thr);
    int t = 1 << (7 + thr);
    int s = ref_state[b] + w;
    if (s >= t) begin s -= t; ref_pos[b]++; end
    else if (s <= -t) begin s += t; ref_neg[b]++; end
    ref_state[b] = s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.tx_valid && dut.tx_ready) begin
      automatic int s = int'(dut.tx_addr[11:6]);
      automatic int j = int'(dut.tx_addr[5:0]);
      n_events[s]++;
      if (s < 16) ref_add(0, wA[s * 64 + j], 2);
      else if (s < 20) begin
        ref_add(1, wB[(s - 16) * 64 + j][0], 0);
        ref_add(2, wB[(s - 16) * 64 + j][1], 0);
      end
    end
    if (rt_out_valid && rt_out_ready) begin
      if (rt_out_gtag == 19'h2a005) begin
        if (rt_out_neg) out_neg[0]++; else out_pos[0]++;
      end else n_bad++;
    end
    if (acc_out_valid && acc_out_ready) begin
      if (acc_out_gtag == {8'd4, 11'd1}) begin
        if (acc_out_neg) out_neg[1]++; else out_pos[1]++;
      end else if (acc_out_gtag == {8'd4, 11'd2}) begin
        if (acc_out_neg) out_neg[2]++; else out_pos[2]++;
      end else n_bad++;
    end
    if (soma_spikes[NEURONS-1:1280] != '0) n_dead_spk++;
    if (aer_collision) n_coll++;
  end

  // ---------------- configuration helpers ----------------
  task automatic w_pat(int s, int row, int base);
    @(negedge clk); pat_we = 1; pat_waddr = SUB_AW'(s); pat_wdata = '{wm_row: 10'(row), am_base: 10'(base)};
    @(negedge clk); pat_we = 0;
  endtask
  task automatic w_wm(int a, int w);
    @(negedge clk); wm_we = 1; wm_waddr = WM_AW'(a); wm_wdata = WEIGHT_W'(w);
    @(negedge clk); wm_we = 0;
  endtask
  task automatic w_am(int a, bit stop, int route, int tag, int thr);
    @(negedge clk); am_we = 1; am_waddr = AM_AW'(a);
    am_wdata = '{stop: stop, gtag: {8'(route), 11'(tag)}, thr: 3'(thr), state: '0};
    @(negedge clk); am_we = 0;
  endtask
  task automatic w_cm(int t, bit kill);
    @(negedge clk); cm_we = 1; cm_wtile = TILE_AW'(t);
    for (int b = 0; b < 16; b++) cm_wdata[8*b +: 8] = kill ? 8'h27 : 8'h07;
    @(negedge clk); cm_we = 0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int quiet, min_ev;
    tat_route_t rp;
    for (int b = 0; b < 3; b++) begin
      ref_state[b] = 0; ref_pos[b] = 0; ref_neg[b] = 0; out_pos[b] = 0; out_neg[b] = 0;
    end
    for (int s = 0; s < 64; s++) n_events[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // kill every soma outside the two pools: tiles 80-255 (somas 1280-4095)
    for (int t = 0; t < 256; t++) w_cm(t, t >= 80);
    // pool A
    for (int s = 0; s < 16; s++) begin
      w_pat(s, s, 0);
      for (int j = 0; j < 64; j++) begin
        wA[s * 64 + j] = int'($urandom_range(0, 254)) - 127;
        w_wm(s * 64 + j, wA[s * 64 + j]);
      end
    end
    w_am(0, 1'b1, 0, 5, 2);
    rp = '{pad: '0, gtag: 19'h2a005};
    @(negedge clk); tat_we = 1; tat_waddr = 11'd5;
    tat_wdata = '{stop: 1'b1, kind: TAT_ROUTE, payload: 26'(rp)};
    @(negedge clk); tat_we = 0;
    // pool B: rows 100 + 2*(s-16) and the next one
    for (int s = 16; s < 20; s++) begin
      w_pat(s, 100 + 2 * (s - 16), 1);
      for (int j = 0; j < 64; j++)
        for (int i = 0; i < 2; i++) begin
          wB[(s - 16) * 64 + j][i] = int'($urandom_range(0, 254)) - 127;
          w_wm((100 + 2 * (s - 16) + i) * 64 + j, wB[(s - 16) * 64 + j][i]);
        end
    end
    w_am(1, 1'b0, 4, 1, 0);
    w_am(2, 1'b1, 4, 2, 0);
    // the remaining (silent) subarrays share a zero-weight bucket
    for (int s = 20; s < 64; s++) w_pat(s, 200, 3);
    for (int j = 0; j < 64; j++) w_wm(200 * 64 + j, 0);
    w_am(3, 1'b1, 4, 3, 7);
    // configuration done: let the somas run
    bias_dac = 16'sd150;
    // run the somas, then silence them and drain
    repeat (400 * TICK) @(negedge clk);
    bias_dac = -16'sd2000;
    quiet = 0;
    while (quiet < 4 * TICK) begin
      @(posedge clk); #1;
      if (datapath_busy || tat_busy || fifo_level != 0 || dut.tx_valid || dut.u_tx.any) quiet = 0;
      else quiet++;
    end
    $display("pool A: events %0d, +%0d/-%0d (reference +%0d/-%0d)", n_events[0], out_pos[0], out_neg[0], ref_pos[0], ref_neg[0]);
    $display("pool B: +%0d/-%0d and +%0d/-%0d", out_pos[1], out_neg[1], out_pos[2], out_neg[2]);
    for (int b = 0; b < 3; b++)
      check(out_pos[b] == ref_pos[b] && out_neg[b] == ref_neg[b],
            $sformatf("output %0d: got +%0d/-%0d, reference +%0d/-%0d",
                      b, out_pos[b], out_neg[b], ref_pos[b], ref_neg[b]));
    min_ev = n_events[0];
    for (int s = 0; s < 20; s++) if (n_events[s] < min_ev) min_ev = n_events[s];
    check(min_ev > 0, "a live subarray was never decoded");
    for (int s = 20; s < 64; s++) check(n_events[s] == 0, $sformatf("killed subarray %0d produced events", s));
    check(n_dead_spk == 0, "a killed soma spiked");
    check(n_bad == 0, "unexpected global tag");
    check(ref_pos[0] + ref_neg[0] > 0 && ref_pos[1] + ref_neg[1] > 0 && ref_pos[2] + ref_neg[2] > 0,
          "an output never crossed threshold");
    check(n_coll > 0, "no AER collision");
    $display("mechanisms: collisions %0d", n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
