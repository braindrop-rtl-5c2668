// aer_tx: address-event transmitter. It multiplexes the spikes of the 4096
// somas into one stream of 12-bit addresses {subarray[5:0], neuron[5:0]},
// the address format the pool action table expects. A spike pulse sets the
// soma's pending flag; each cycle in which the output is free, the pending
// soma of the lowest-numbered pending 64-soma group, lowest index first, is
// sent and its flag cleared. A soma that spikes again while still pending is
// counted once (the dropped pulse is reported on `collision`). The chip uses
// a bit-serial H-tree router whose insides are described elsewhere; this
// two-level round-robin/priority encoder is this design's simplest
// stand-in with the same function.
// Interface: spike[i] is a one-cycle pulse; the output uses valid/ready and
// holds address and valid until taken. One event per cycle at most.
module aer_tx
  import braindrop_pkg::*;
#(
  parameter int unsigned N_NEURONS = NEURONS,
  parameter int unsigned GROUP   = NRN_PER_SUB
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_NEURONS-1:0]         spike,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [$clog2(N_NEURONS)-1:0] out_addr,
  output logic                       collision
);
  localparam int unsigned GROUPS = N_NEURONS / GROUP;
  localparam int unsigned AW     = $clog2(N_NEURONS);
  localparam int unsigned GW     = $clog2(GROUPS);
  localparam int unsigned IW     = $clog2(GROUP);

  logic [N_NEURONS-1:0] pending;
  logic [GROUPS-1:0]  grp_any;
  logic [GW-1:0]      g_sel;
  logic [IW-1:0]      i_sel;
  logic               any;
  logic               take;
  logic [N_NEURONS-1:0] clr;
  logic [GW-1:0]      rr_next;     // group with the highest priority
  logic [GROUPS-1:0]  grp_hi;

  always_comb begin
    for (int g = 0; g < int'(GROUPS); g++)
      grp_any[g] = |pending[g*GROUP +: GROUP];
    any   = |grp_any;
    for (int g = 0; g < int'(GROUPS); g++)
      grp_hi[g] = grp_any[g] && (GW'(g) >= rr_next);
    g_sel = '0;
    for (int g = int'(GROUPS) - 1; g >= 0; g--)
      if (grp_any[g]) g_sel = GW'(g);
    if (|grp_hi)
      for (int g = int'(GROUPS) - 1; g >= 0; g--)
        if (grp_hi[g]) g_sel = GW'(g);
    i_sel = '0;
    for (int i = int'(GROUP) - 1; i >= 0; i--)
      if (pending[int'(g_sel)*GROUP + i]) i_sel = IW'(i);
  end

  assign take = any && (!out_valid || out_ready);

  always_comb begin
    clr = '0;
    if (take) clr[{g_sel, i_sel}] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= '0;
      out_valid <= 1'b0;
      out_addr  <= '0;
      collision <= 1'b0;
      rr_next   <= '0;
    end else begin
      pending   <= (pending & ~clr) | spike;
      collision <= |(pending & ~clr & spike);
      if (take) begin
        rr_next   <= g_sel + 1'b1;
        out_valid <= 1'b1;
        out_addr  <= AW'({g_sel, i_sel});
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule
