// synaptic_filter_model: behavioural model of one analog synaptic filter
// (a subthreshold current-mode low-pass circuit on the chip). Not a circuit
// design: it reproduces the filter's function in fixed point. Each
// excitatory or inhibitory input pulse (a unit-area delta) steps the output
// current by +/-AMP; on every analog time step (tick) the current decays by
// 1/2^TAU_SHIFT of itself, a first-order leak with a time constant of about
// 2^TAU_SHIFT ticks. A killed filter outputs zero. Leaky integration of
// signed unit deltas follows the architecture; AMP, TAU_SHIFT and the
// fixed-point format are this model's choices.
// Interface: exc/inh are one-cycle pulses; out is a 16-bit signed current.
module synaptic_filter_model #(
  parameter int AMP       = 64,
  parameter int TAU_SHIFT = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic               exc,
  input  logic               inh,
  input  logic               kill,
  output logic signed [15:0] out
);
  logic signed [17:0] acc, nxt;

  always_comb begin
    nxt = acc;
    if (tick) nxt = nxt - (nxt >>> TAU_SHIFT);
    if (exc)  nxt = nxt + 18'(AMP);
    if (inh)  nxt = nxt - 18'(AMP);
    if (nxt > 18'sd32767)  nxt = 18'sd32767;
    if (nxt < -18'sd32768) nxt = -18'sd32768;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (kill) acc <= '0;
    else           acc <= nxt;
  end

  assign out = acc[15:0];
endmodule
