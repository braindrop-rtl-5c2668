// tb_rotation_workload: 2-D vector rotation run on the full-size core, the
// digital half of the rotation network. The input vector (x, y) arrives from
// the host as two streams of signed unit deltas, local tags 100 (x) and 101
// (y). Each tag's action list holds one transform entry, which adds a column
// of the rotation matrix R(theta) (weights round(127 cos), round(127 sin),
// in units of 1/128) to two accumulator buckets. The buckets have threshold
// code 0 (T = 128) and global tags with route 3, so their thinned deltas
// leave the core on acc_out. For six angles and the four sign quadrants of
// (x, y) the test sends random numbers of deltas, waits until the core is
// idle, and checks:
//   - the positive and negative deltas from each bucket exactly match a
//     reference model that replays the same deltas, in the same order,
//     through the two-sided thresholding accumulator;
//   - the net delta count of each output is within 2 of the ideal rotated
//     value (R * n) * w / 128.
// Within a run each tag keeps one sign, so the FIFO's folding of repeated
// tags does not reorder anything the reference sees. The host pushes
// faster than the transform path drains, so the FIFO folds tags; folds,
// transforms and acc_out back-pressure are counted and must each occur.
// The analog models are left idle: no analog tick, no soma spikes.
module tb_rotation_workload;
  import braindrop_pkg::*;

  logic clk = 0, rst_n = 0, analog_tick = 0;
  logic signed [15:0] bias_dac = -16'sd400;
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

  braindrop_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- output counters ----------------
  int out_pos[2], out_neg[2];
  int n_bad = 0, n_merge = 0, n_xf = 0, n_stall = 0, n_rt = 0;
  always @(posedge clk) if (rst_n) begin
    acc_out_ready <= ($urandom_range(0, 3) != 0);
    if (acc_out_valid && acc_out_ready) begin
      if (acc_out_gtag == {8'd3, 11'd1}) begin
        if (acc_out_neg) out_neg[0]++; else out_pos[0]++;
      end else if (acc_out_gtag == {8'd3, 11'd2}) begin
        if (acc_out_neg) out_neg[1]++; else out_pos[1]++;
      end else n_bad++;
    end
    if (acc_out_valid && !acc_out_ready) n_stall++;
    if (fifo_merged) n_merge++;
    if (dut.xf_valid && dut.xf_ready) n_xf++;
    if (rt_out_valid) n_rt++;
  end

  // ---------------- configuration helpers ----------------
  task automatic w_wm(int a, int w);
    @(negedge clk); wm_we = 1; wm_waddr = WM_AW'(a); wm_wdata = WEIGHT_W'(w);
    @(negedge clk); wm_we = 0;
  endtask
  task automatic w_am(int a, bit stop, int tag);
    @(negedge clk); am_we = 1; am_waddr = AM_AW'(a);
    am_wdata = '{stop: stop, gtag: {8'd3, 11'(tag)}, thr: 3'd0, state: '0};
    @(negedge clk); am_we = 0;
  endtask
  task automatic w_tat(int a, int am, int wm);
    tat_acc_t p = '{am_base: 10'(am), wm_base: 16'(wm)};
    @(negedge clk); tat_we = 1; tat_waddr = TAG_W'(a);
    tat_wdata = '{stop: 1'b1, kind: TAT_ACC, payload: 26'(p)};
    @(negedge clk); tat_we = 0;
  endtask
  task automatic push_host(int tag, bit neg);
    @(negedge clk); host_valid = 1; host_tag = TAG_W'(tag); host_neg = neg;
    @(posedge clk); while (!host_ready) @(posedge clk);
    #1 host_valid = 0;
  endtask
  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 50) begin
      @(posedge clk); #1;
      if (datapath_busy || tat_busy || fifo_level != 0 || acc_out_valid) quiet = 0;
      else quiet++;
    end
  endtask

  // ---------------- reference accumulator ----------------
  int ref_state[2], ref_pos[2], ref_neg[2];
  task automatic ref_add(int b, int w);
    int s = ref_state[b] + w;
    if (s >= 128) begin s -= 128; ref_pos[b]++; end
    else if (s <= -128) begin s += 128; ref_neg[b]++; end
    ref_state[b] = s;
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
    real th;
    int c, s, nx, ny, sx, sy, left_x, left_y, ideal0, ideal1;
    int col0[2], col1[2], run;
    bit is_x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    w_tat(100, 0, 2000);   // x: column 0 of R at WM 2000..2001
    w_tat(101, 0, 2002);   // y: column 1 of R at WM 2002..2003
    for (int a = 0; a < 6; a++) begin
      th = 3.14159265358979 * a / 6.0;
      c = int'($rtoi(127.0 * $cos(th) + (($cos(th) >= 0) ? 0.5 : -0.5)));
      s = int'($rtoi(127.0 * $sin(th) + (($sin(th) >= 0) ? 0.5 : -0.5)));
      col0 = '{c, s};
      col1 = '{-s, c};
      w_wm(2000, col0[0]); w_wm(2001, col0[1]);
      w_wm(2002, col1[0]); w_wm(2003, col1[1]);
      for (int q = 0; q < 4; q++) begin
        sx = ((q & 1) != 0) ? -1 : 1;
        sy = ((q & 2) != 0) ? -1 : 1;
        nx = $urandom_range(20, 300);
        ny = $urandom_range(20, 300);
        // clear both buckets and the reference
        w_am(0, 1'b0, 1);
        w_am(1, 1'b1, 2);
        for (int b = 0; b < 2; b++) begin
          ref_state[b] = 0; ref_pos[b] = 0; ref_neg[b] = 0;
          out_pos[b] = 0; out_neg[b] = 0;
        end
        left_x = nx; left_y = ny;
        while (left_x + left_y > 0) begin
          // runs of one tag, so the FIFO gets repeated tags to fold
          run = $urandom_range(1, 8);
          is_x = (left_y == 0) || (left_x > 0 && $urandom_range(0, 1) == 1);
          for (int k = 0; k < run; k++) begin
            if (is_x && left_x > 0) begin
              push_host(100, sx < 0);
              ref_add(0, sx * col0[0]); ref_add(1, sx * col0[1]);
              left_x--;
            end else if (!is_x && left_y > 0) begin
              push_host(101, sy < 0);
              ref_add(0, sy * col1[0]); ref_add(1, sy * col1[1]);
              left_y--;
            end
          end
        end
        wait_idle();
        ideal0 = (sx * nx * col0[0] + sy * ny * col1[0]) / 128;
        ideal1 = (sx * nx * col0[1] + sy * ny * col1[1]) / 128;
        for (int b = 0; b < 2; b++) begin
          check(out_pos[b] == ref_pos[b] && out_neg[b] == ref_neg[b],
                $sformatf("theta %0d q %0d bucket %0d: got +%0d/-%0d, reference +%0d/-%0d",
                          a, q, b, out_pos[b], out_neg[b], ref_pos[b], ref_neg[b]));
        end
        check((out_pos[0] - out_neg[0] - ideal0) <= 2 && (out_pos[0] - out_neg[0] - ideal0) >= -2,
              $sformatf("theta %0d q %0d x' net %0d ideal %0d", a, q, out_pos[0] - out_neg[0], ideal0));
        check((out_pos[1] - out_neg[1] - ideal1) <= 2 && (out_pos[1] - out_neg[1] - ideal1) >= -2,
              $sformatf("theta %0d q %0d y' net %0d ideal %0d", a, q, out_pos[1] - out_neg[1], ideal1));
      end
    end
    check(n_bad == 0, "unexpected global tag on acc_out");
    check(n_rt == 0, "unexpected route output");
    $display("mechanisms: transforms %0d folds %0d acc_out stalls %0d", n_xf, n_merge, n_stall);
    check(n_xf > 0, "no transform request");
    check(n_merge > 0, "no FIFO fold");
    check(n_stall > 0, "no acc_out back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
