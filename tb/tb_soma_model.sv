// tb_soma_model: runs eight somas with different configuration bits and
// input currents for 2000 analog time steps and compares each one's spike
// count with an integer reference of the integrate-and-fire rule (drive =
// input + bias + mismatch + offset, attenuated, leak of v/64, threshold
// 4096). Also checks that a killed soma and a soma with negative drive stay
// silent, that attenuation lowers the rate and a larger offset raises it.
module tb_soma_model;
  logic clk = 0, rst_n = 0, tick = 0;
  int checks = 0, failures = 0;
  localparam int N = 8;
  logic signed [17:0] i_in [N];
  logic [5:0] cfg [N];
  logic [N-1:0] spike;
  int cnt [N];
  int exp_cnt [N];
  localparam int MM = 37;

  for (genvar k = 0; k < N; k++) begin : g
    soma_model #(.MISMATCH(MM)) u (.clk, .rst_n, .tick, .i_in(i_in[k]), .bias(16'sd100), .cfg(cfg[k]), .spike(spike[k]));
  end
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_count(int ii, logic [5:0] c, int steps);
    int v = 0, n = 0, drive, sc, off;
    if (c[5]) return 0;
    off = (c[2:0] == 7) ? 0 : (int'(c[2:0]) - 3) * 16;
    drive = ii + 100 + MM + off;
    case (c[4:3])
      0: sc = drive;
      1: sc = drive >>> 1;
      2: sc = (drive * 85) >>> 8;
      default: sc = drive >>> 2;
    endcase
    for (int s = 0; s < steps; s++) begin
      v = v + sc - (v >>> 6);
      if (v < 0) v = 0;
      if (v >= 4096) begin v -= 4096; n++; end
    end
    return n;
  endfunction

  always @(posedge clk) for (int k = 0; k < N; k++) if (spike[k]) cnt[k]++;

  initial begin
    i_in[0] = 200;  cfg[0] = 6'b000_011;  // offset 0, gain 1
    i_in[1] = 200;  cfg[1] = 6'b001_011;  // gain 1/2
    i_in[2] = 200;  cfg[2] = 6'b010_011;  // gain 1/3
    i_in[3] = 200;  cfg[3] = 6'b011_011;  // gain 1/4
    i_in[4] = 200;  cfg[4] = 6'b000_110;  // offset +3
    i_in[5] = 200;  cfg[5] = 6'b000_000;  // offset -3
    i_in[6] = 900;  cfg[6] = 6'b100_011;  // killed
    i_in[7] = -900; cfg[7] = 6'b000_011;  // negative drive
    for (int k = 0; k < N; k++) cnt[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
    end
    repeat (3) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      exp_cnt[k] = ref_count(int'(i_in[k]), cfg[k], 2000);
      checks++;
      if (cnt[k] != exp_cnt[k]) begin failures++; $display("FAIL soma %0d count %0d exp %0d", k, cnt[k], exp_cnt[k]); end
    end
    checks++; if (cnt[6] != 0 || cnt[7] != 0) begin failures++; $display("FAIL silent somas spiked"); end
    checks++; if (!(cnt[0] > cnt[1] && cnt[1] > cnt[2] && cnt[2] > cnt[3] && cnt[3] > 0)) begin failures++; $display("FAIL attenuation order"); end
    checks++; if (!(cnt[4] > cnt[0] && cnt[0] > cnt[5])) begin failures++; $display("FAIL offset order"); end
    $display("counts %0d %0d %0d %0d %0d %0d %0d %0d", cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5], cnt[6], cnt[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
