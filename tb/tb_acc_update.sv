// tb_acc_update: checks the accumulative-thinning step against an integer
// reference of the two-sided threshold rule, over random states, weights and
// threshold codes, and runs a stream of 0.1-weight deltas (13/128) through a
// bucket to check that it emits one +1 delta per ceil(T/13) inputs.
module tb_acc_update;
  import braindrop_pkg::*;
  logic signed [STATE_W-1:0] s_in, s_out;
  logic signed [WEIGHT_W:0]  w;
  logic [THR_W-1:0]          thr;
  logic fp, fn;
  int checks = 0, failures = 0;

  acc_update dut (.state_in(s_in), .weight(w), .thr(thr), .state_out(s_out), .fire_pos(fp), .fire_neg(fn));

  task automatic check_one();
    int t, sum, exp_s; bit ep, en;
    t = 1 << (7 + int'(thr));
    sum = int'(s_in) + int'(w);
    ep = 0; en = 0; exp_s = sum;
    if (sum >= t) begin ep = 1; exp_s = sum - t; end
    else if (sum <= -t) begin en = 1; exp_s = sum + t; end
    #1;
    checks++;
    if (int'(s_out) != exp_s || fp != ep || fn != en) begin
      failures++;
      $display("FAIL s=%0d w=%0d thr=%0d got %0d %b%b exp %0d %b%b", s_in, w, thr, s_out, fp, fn, exp_s, ep, en);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, fires, n;
    for (int k = 0; k < 3000; k++) begin
      thr = 3'($urandom);
      t = 1 << (7 + int'(thr));
      s_in = STATE_W'(int'($urandom_range(0, 2*t - 2)) - (t - 1));
      w    = (WEIGHT_W+1)'(int'($urandom_range(0, 256)) - 128);
      check_one();
    end
    // corner cases: exactly at +T and -T
    thr = 0; s_in = 15'sd0;   w = 9'sd128;  check_one();
    thr = 0; s_in = 15'sd0;   w = -9'sd128; check_one();
    thr = 7; s_in = 15'sd16383; w = 9'sd1;  check_one();
    thr = 7; s_in = -15'sd16383; w = -9'sd1; check_one();
    // a stream of w = 13/128 (about 0.1): one output per 10 inputs at thr 0
    thr = 0; s_in = 0; w = 9'sd13; fires = 0; n = 0;
    for (int k = 0; k < 100; k++) begin
      #1; if (fp) fires++; s_in = s_out; n++;
    end
    checks++;
    if (fires != (100 * 13) / 128) begin failures++; $display("FAIL stream fires %0d", fires); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
