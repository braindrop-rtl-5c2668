// acc_update: one step of accumulative thinning, the two-sided thresholding
// accumulator of the architecture. The weight is added to the bucket state;
// if the sum reaches +T a +1 delta is emitted and T subtracted, if it reaches
// -T a -1 delta is emitted and T added. With weights limited to [-1, 1] at
// most one delta leaves per update. The state is kept in units of 1/128 so an
// 8-bit weight is added directly; T = 2^(7+thr) units, so the 3-bit threshold
// code scales the number of input deltas needed to trip the bucket (1x to
// 128x). The threshold encoding is this design's choice.
// Purely combinational. The weight input is 9 bits so that a transform
// driven by a negative tag can add -w for any 8-bit w.
module acc_update
  import braindrop_pkg::*;
(
  input  logic signed [STATE_W-1:0] state_in,
  input  logic signed [WEIGHT_W:0]  weight,
  input  logic [THR_W-1:0]          thr,
  output logic signed [STATE_W-1:0] state_out,
  output logic                      fire_pos,
  output logic                      fire_neg
);
  localparam int SUM_W = STATE_W + 2;
  logic signed [SUM_W-1:0] sum, t, res;

  always_comb begin
    t        = SUM_W'(acc_threshold(thr));
    sum      = SUM_W'(state_in) + SUM_W'(weight);
    fire_pos = 1'b0;
    fire_neg = 1'b0;
    res      = sum;
    if (sum >= t) begin
      fire_pos = 1'b1;
      res      = sum - t;
    end else if (sum <= -t) begin
      fire_neg = 1'b1;
      res      = sum + t;
    end
    state_out = res[STATE_W-1:0];
  end
endmodule
