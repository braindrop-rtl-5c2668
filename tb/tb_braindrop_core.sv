// tb_braindrop_core: end-to-end test of one core at its full size.
// Network: the host drives pool A (subarray 0, somas in rows/cols 0-7)
// through tag 20, whose action list sends deltas to the nine synaptic
// filters under the pool. Pool A decodes one dimension with weight 20/128
// into bucket 0 (tag 10). Tag 10's list sends deltas to two filters under
// pool B (subarray 9), a transform with weight 64/128 into bucket 1 (whose
// tag has route 5, so its deltas leave the core) and a route to the host.
// Pool B decodes with weight -20/128 into bucket 2 (tag 30, routed out as
// negative deltas). All other subarrays map to a zero-weight bucket. The
// somas' bias keeps every soma silent unless driven through the diffusor.
// Checks, from counts taken at the datapath's and core's ports:
//   tag-10 deltas = floor(20 * pool-A decode events / 128)
//   route deltas of tag 10 = tag-10 deltas (FIFO counts replayed)
//   bucket-1 deltas leaving the core = floor(tag-10 deltas / 2)
//   tag-30 negative deltas = floor(20 * pool-B decode events / 128)
//   synaptic deltas = 9 per host tag 20 + 2 per tag-10 delta
//   killed soma 0 never spikes; killed filter 198 stays at zero.
// A last phase blocks the route output and floods the FIFO with
// alternating host tags until it is full, then checks every one comes out.
// Every mechanism (decode, +/- threshold crossing, transform, sparse
// encode, route, off-core accumulator delta, FIFO merge, FIFO full, AER
// collision, datapath stall, soma kill, filter kill) is counted and must
// happen at least once.
module tb_braindrop_core;
  import braindrop_pkg::*;
  localparam int TICK = 32;

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

  // analog time steps
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    analog_tick <= (cyc % TICK == TICK - 1);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- counters ----------------
  int n_dec_a = 0, n_dec_b = 0, n_dec = 0;
  int n_t10 = 0, n_t30_neg = 0, n_pos = 0, n_neg = 0;
  int n_xf = 0, n_syn = 0, n_rt10 = 0, n_rt30 = 0, n_rt40 = 0, n_rt41 = 0, n_rt_other = 0;
  int n_acc_out = 0, n_acc_out_bad = 0, n_merge = 0, n_full = 0, n_coll = 0, n_dp_stall = 0;
  int n_host20 = 0, n_host40 = 0, n_host41 = 0, n_kill_spk = 0, n_filter_nz = 0;
  int n_spk_a = 0, n_spk_b = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.tx_valid && dut.tx_ready) begin
      n_dec++;
      if (dut.tx_addr[11:6] == 6'd0) n_dec_a++;
      if (dut.tx_addr[11:6] == 6'd9) n_dec_b++;
    end
    if (dut.dp_valid && dut.dp_ready) begin
      if (dut.dp_neg) n_neg++; else n_pos++;
      if (dut.dp_gtag == 19'd10) n_t10++;
      if (dut.dp_gtag == 19'd30 && dut.dp_neg) n_t30_neg++;
    end
    if (dut.dp_valid && !dut.dp_ready) n_dp_stall++;
    if (dut.xf_valid && dut.xf_ready) n_xf++;
    if (dut.syn_valid && dut.syn_ready) n_syn++;
    if (rt_out_valid && rt_out_ready) begin
      if (rt_out_gtag == 19'h70055 && !rt_out_neg) n_rt10++;
      else if (rt_out_gtag == 19'h10030 && rt_out_neg) n_rt30++;
      else if (rt_out_gtag == 19'h60040) n_rt40++;
      else if (rt_out_gtag == 19'h60041) n_rt41++;
      else n_rt_other++;
    end
    if (acc_out_valid && acc_out_ready) begin
      if (acc_out_gtag == {8'd5, 11'd3} && !acc_out_neg) n_acc_out++; else n_acc_out_bad++;
    end
    if (fifo_merged) n_merge++;
    if (fifo_full) n_full++;
    if (aer_collision) n_coll++;
    if (host_valid && host_ready) begin
      if (host_tag == 11'd20) n_host20++;
      if (host_tag == 11'd40) n_host40++;
      if (host_tag == 11'd41) n_host41++;
    end
    if (soma_spikes[0]) n_kill_spk++;
    if (dut.g_syn[198].u_f.out != 0) n_filter_nz++;
    for (int i = 0; i < 64; i++) begin
      if (soma_spikes[i]) n_spk_a++;
      if (soma_spikes[9*64 + i]) n_spk_b++;
    end
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
  task automatic w_am(int a, int route, int tag);
    @(negedge clk); am_we = 1; am_waddr = AM_AW'(a);
    am_wdata = '{stop: 1'b1, gtag: {8'(route), 11'(tag)}, thr: 3'd0, state: '0};
    @(negedge clk); am_we = 0;
  endtask
  task automatic w_tat(int a, tat_entry_t e);
    @(negedge clk); tat_we = 1; tat_waddr = TAG_W'(a); tat_wdata = e;
    @(negedge clk); tat_we = 0;
  endtask
  function automatic tat_entry_t syn2(bit stop, int a0, int a1);
    tat_syn_t p;
    p.pad = '0;
    p.tap0 = '{valid: 1'b1, neg: 1'b0, addr: 10'(a0)};
    p.tap1 = '{valid: a1 >= 0, neg: 1'b0, addr: 10'(a1 < 0 ? 0 : a1)};
    return '{stop: stop, kind: TAT_SYN, payload: 26'(p)};
  endfunction
  function automatic tat_entry_t acc(bit stop, int am, int wm);
    tat_acc_t p = '{am_base: 10'(am), wm_base: 16'(wm)};
    return '{stop: stop, kind: TAT_ACC, payload: 26'(p)};
  endfunction
  function automatic tat_entry_t route(bit stop, int g);
    tat_route_t p = '{pad: '0, gtag: 19'(g)};
    return '{stop: stop, kind: TAT_ROUTE, payload: 26'(p)};
  endfunction

  task automatic push_host(int tag);
    @(negedge clk); host_valid = 1; host_tag = TAG_W'(tag); host_neg = 0;
    @(posedge clk); while (!host_ready) @(posedge clk);
    #1 host_valid = 0;
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 50) begin
      @(posedge clk); #1;
      if (datapath_busy || tat_busy || fifo_level != 0 || dut.tx_valid || dut.u_tx.any) quiet = 0;
      else quiet++;
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int exp_t10, exp_t30;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // PAT: every subarray -> zero-weight bucket 10, except pools A and B
    for (int s = 0; s < 64; s++) w_pat(s, 2, 10);
    w_pat(0, 0, 0);
    w_pat(9, 1, 2);
    for (int n = 0; n < 64; n++) begin
      w_wm(0 * 64 + n, 20);
      w_wm(1 * 64 + n, -20);
      w_wm(2 * 64 + n, 0);
    end
    w_wm(1000, 64);
    w_am(0, 0, 10);
    w_am(1, 5, 3);
    w_am(2, 0, 30);
    w_am(10, 0, 50);
    // TAT
    w_tat(20, syn2(0, 0, 1));            // filters (0,0) (0,1)
    w_tat(21, syn2(0, 2, 32));           // (0,2) (1,0)
    w_tat(22, syn2(0, 33, 34));          // (1,1) (1,2)
    w_tat(23, syn2(0, 64, 65));          // (2,0) (2,1)
    w_tat(24, syn2(1, 66, -1));          // (2,2)
    w_tat(10, syn2(0, 165, 198));        // pool B filters (5,5) (6,6)
    w_tat(11, acc(0, 1, 1000));
    w_tat(12, route(1, 19'h70055));
    w_tat(30, route(1, 19'h10030));
    w_tat(40, route(1, 19'h60040));
    w_tat(41, route(1, 19'h60041));
    w_tat(50, '{stop: 1'b1, kind: TAT_NOP, payload: '0});
    // CM: kill soma 0 (tile 0, byte 0 bit 5) and filter 198 (soma 612 = tile 38, byte 4, bit 6)
    @(negedge clk); cm_we = 1; cm_wtile = 8'd0;  cm_wdata = '0; cm_wdata[5] = 1'b1; cm_wdata[8*1 +: 3] = 3'd3;
    for (int b = 0; b < 16; b++) if (b != 0) cm_wdata[8*b +: 3] = 3'd3;   // offset code 3 = 0 units
    @(negedge clk); cm_wtile = 8'd38; cm_wdata = '0; cm_wdata[8*4 + 6] = 1'b1;
    @(negedge clk); cm_we = 0;

    // phase 1: drive pool A
    fork
      begin
        for (int k = 0; k < 300; k++) begin
          push_host(20);
          if (k % 3 == 0) push_host(20);
          repeat (TICK - 4) @(negedge clk);
        end
      end
      begin
        for (int k = 0; k < 300 * TICK; k++) begin
          @(negedge clk);
          acc_out_ready = 1'($urandom_range(0, 3) != 0);
          rt_out_ready  = 1'($urandom_range(0, 9) != 0);
        end
        acc_out_ready = 1; rt_out_ready = 1;
      end
    join
    // phase 2: let activity die out
    repeat (200 * TICK) @(negedge clk);
    wait_idle();
    $display("decode events A=%0d B=%0d all=%0d, soma spikes A=%0d B=%0d", n_dec_a, n_dec_b, n_dec, n_spk_a, n_spk_b);
    $display("t10=%0d t30neg=%0d rt10=%0d rt30=%0d acc_out=%0d syn=%0d xf=%0d host20=%0d",
             n_t10, n_t30_neg, n_rt10, n_rt30, n_acc_out, n_syn, n_xf, n_host20);
    exp_t10 = (n_dec_a * 20) / 128;
    exp_t30 = (n_dec_b * 20) / 128;
    checks++; if (n_t10 != exp_t10) begin failures++; $display("FAIL tag10 %0d exp %0d", n_t10, exp_t10); end
    checks++; if (n_t30_neg != exp_t30) begin failures++; $display("FAIL tag30 %0d exp %0d", n_t30_neg, exp_t30); end
    checks++; if (n_rt10 != n_t10) begin failures++; $display("FAIL route10 %0d exp %0d", n_rt10, n_t10); end
    checks++; if (n_rt30 != n_t30_neg) begin failures++; $display("FAIL route30 %0d exp %0d", n_rt30, n_t30_neg); end
    checks++; if (n_xf != n_t10) begin failures++; $display("FAIL transforms %0d exp %0d", n_xf, n_t10); end
    checks++; if (n_acc_out != n_t10 / 2 || n_acc_out_bad != 0) begin failures++; $display("FAIL acc_out %0d exp %0d", n_acc_out, n_t10 / 2); end
    checks++; if (n_syn != 9 * n_host20 + 2 * n_t10) begin failures++; $display("FAIL syn %0d exp %0d", n_syn, 9 * n_host20 + 2 * n_t10); end
    checks++; if (n_kill_spk != 0) begin failures++; $display("FAIL killed soma spiked"); end
    checks++; if (n_filter_nz != 0) begin failures++; $display("FAIL killed filter active"); end
    checks++; if (n_rt_other != 0) begin failures++; $display("FAIL unexpected route"); end

    // phase 3: FIFO full
    rt_out_ready = 0;
    push_host(40);
    for (int k = 0; k < 5; k++) push_host(41);   // folded into one FIFO word
    for (int k = 0; k < FIFO_DEPTH + 40; k++) begin
      if (fifo_full) break;
      push_host(40 + (k % 2));
    end
    repeat (20) @(negedge clk);
    rt_out_ready = 1;
    wait_idle();
    checks++; if (n_rt40 != n_host40 || n_rt41 != n_host41) begin failures++; $display("FAIL flood %0d/%0d %0d/%0d", n_rt40, n_host40, n_rt41, n_host41); end

    // coverage of mechanisms
    $display("mech: decode=%0d pos=%0d neg=%0d xf=%0d syn=%0d route=%0d acc_out=%0d merge=%0d full=%0d collision=%0d dp_stall=%0d",
             n_dec, n_pos, n_neg, n_xf, n_syn, n_rt10 + n_rt30 + n_rt40 + n_rt41, n_acc_out, n_merge, n_full, n_coll, n_dp_stall);
    checks++; if (n_dec == 0)      begin failures++; $display("FAIL never: decode"); end
    checks++; if (n_pos == 0)      begin failures++; $display("FAIL never: +1 delta"); end
    checks++; if (n_neg == 0)      begin failures++; $display("FAIL never: -1 delta"); end
    checks++; if (n_xf == 0)       begin failures++; $display("FAIL never: transform"); end
    checks++; if (n_syn == 0)      begin failures++; $display("FAIL never: sparse encode"); end
    checks++; if (n_rt10 == 0)     begin failures++; $display("FAIL never: route"); end
    checks++; if (n_acc_out == 0)  begin failures++; $display("FAIL never: off-core accumulator delta"); end
    checks++; if (n_merge == 0)    begin failures++; $display("FAIL never: FIFO merge"); end
    checks++; if (n_full == 0)     begin failures++; $display("FAIL never: FIFO full"); end
    checks++; if (n_coll == 0)     begin failures++; $display("FAIL never: AER collision"); end
    checks++; if (n_dp_stall == 0) begin failures++; $display("FAIL never: datapath stall"); end
    checks++; if (n_spk_b == 0)    begin failures++; $display("FAIL never: pool B driven by sparse encode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
