// aer_rx: address-event receiver. It demultiplexes the stream of signed
// synaptic-filter deltas coming out of the tag action table into one-cycle
// pulses on the addressed filter's excitatory (positive delta) or inhibitory
// (negative delta) input, the unit-area signed deltas the analog synaptic
// filters take. The chip uses a bit-serial H-tree receiver described
// elsewhere; this registered decoder is this design's simplest stand-in with
// the same function.
// Interface: valid/ready input, always ready; the pulse appears on exc/inh
// the cycle after the event is accepted and lasts one cycle.
module aer_rx
  import braindrop_pkg::*;
#(
  parameter int unsigned N_SYN = SYNAPSES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [$clog2(N_SYN)-1:0] in_addr,
  input  logic                        in_neg,
  output logic [N_SYN-1:0]         exc,
  output logic [N_SYN-1:0]         inh
);
  assign in_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exc <= '0;
      inh <= '0;
    end else begin
      exc <= '0;
      inh <= '0;
      if (in_valid) begin
        if (in_neg) inh[in_addr] <= 1'b1;
        else        exc[in_addr] <= 1'b1;
      end
    end
  end
endmodule
