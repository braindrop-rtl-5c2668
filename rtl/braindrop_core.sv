// braindrop_core: one Braindrop core. Computations are networks of pools of
// spiking neurons; a pool's output is a weighted sum of its spike rates
// (decode), which after an optional linear transform drives other pools'
// inputs (encode). The core does decode and transform with digital
// accumulators that thin weighted spike trains into sparse signed unit
// deltas, and encodes by sending those deltas to a few synaptic filters (tap
// points) whose currents the analog diffusor spreads over the neuron array.
//
// Data flow (one clock; the analog parts step on analog_tick):
//   somas --spike--> aer_tx --{subarray,neuron}--> accum_datapath
//     (PAT -> WM weights -> AM buckets -> acc_update)
//   --> delta {global tag, sign}: route 0 -> tag_fifo port a
//                                 route != 0 -> acc_out_* (off core)
//   host_tag_* --> tag_fifo port b
//   tag_fifo --> tat_controller (TAT actions)
//        transform  -> accum_datapath (transform request)
//        tap points -> aer_rx -> synaptic_filter_model x1024
//                      -> diffusor_model -> soma_model x4096
//        route      -> rt_out_* (off core)
//   config_memory holds each soma's offset/attenuation/kill bits and each
//   filter's kill bit.
// Neuron address n = {subarray[5:0], index[5:0]}; a subarray is an 8x8 block
// of the 64x64 soma array: row = {n[11:9], n[5:3]}, column = {n[8:6], n[2:0]}.
// Synaptic filter a = {row[4:0], column[4:0]} on the 32x32 filter grid, one
// per 2x2 somas. Sizes and the overall flow follow the architecture; the
// geometry, the route field of the global tag, the host port into the FIFO
// and the fixed-point analog models are this design's choices.
// The analog parts (somas, filters, diffusor) are behavioural models; the
// bias DACs, ADCs and the host are outside this module.
module braindrop_core
  import braindrop_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        analog_tick,
  input  logic signed [15:0]          bias_dac,
  // configuration
  input  logic                        pat_we,
  input  logic [SUB_AW-1:0]           pat_waddr,
  input  pat_entry_t                  pat_wdata,
  input  logic                        wm_we,
  input  logic [WM_AW-1:0]            wm_waddr,
  input  logic signed [WEIGHT_W-1:0]  wm_wdata,
  input  logic                        am_we,
  input  logic [AM_AW-1:0]            am_waddr,
  input  am_entry_t                   am_wdata,
  input  logic                        tat_we,
  input  logic [TAG_W-1:0]            tat_waddr,
  input  tat_entry_t                  tat_wdata,
  input  logic                        cm_we,
  input  logic [TILE_AW-1:0]          cm_wtile,
  input  logic [CM_TILE_BITS-1:0]     cm_wdata,
  // tags from the host
  input  logic                        host_valid,
  output logic                        host_ready,
  input  logic [TAG_W-1:0]            host_tag,
  input  logic                        host_neg,
  // accumulator deltas with a global route
  output logic                        acc_out_valid,
  input  logic                        acc_out_ready,
  output logic [GTAG_W-1:0]           acc_out_gtag,
  output logic                        acc_out_neg,
  // TAT route deltas
  output logic                        rt_out_valid,
  input  logic                        rt_out_ready,
  output logic [GTAG_W-1:0]           rt_out_gtag,
  output logic                        rt_out_neg,
  // observation
  output logic [NEURONS-1:0]          soma_spikes,
  output logic                        fifo_full,
  output logic                        fifo_merged,     // a delta folded into the FIFO tail
  output logic [$clog2(FIFO_DEPTH):0] fifo_level,
  output logic                        aer_collision,   // a soma spiked while still pending
  output logic                        datapath_busy,
  output logic                        tat_busy
);
  localparam int SYN_SIDE = 32;
  localparam int NSIDE    = 64;

  // ---------------- digital datapath ----------------
  logic              tx_valid, tx_ready;
  logic [NRN_AW-1:0] tx_addr;

  logic              xf_valid, xf_ready, xf_neg;
  logic [AM_AW-1:0]  xf_am_base;
  logic [WM_AW-1:0]  xf_wm_base;

  logic              dp_valid, dp_ready, dp_neg;
  logic [GTAG_W-1:0] dp_gtag;
  logic              dp_local;

  logic              fa_valid, fa_ready;
  fifo_entry_t       f_data;
  logic              f_valid, f_ready;

  logic              syn_valid, syn_ready, syn_neg;
  logic [SYN_AW-1:0] syn_addr;
  logic [SYNAPSES-1:0] exc, inh;

  logic [NEURONS*CFG_W-1:0] cfg_bus;

  aer_tx u_tx (
    .clk, .rst_n, .spike(soma_spikes),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_addr(tx_addr),
    .collision(aer_collision)
  );

  accum_datapath u_dp (
    .clk, .rst_n,
    .spk_valid(tx_valid), .spk_ready(tx_ready), .spk_addr(tx_addr),
    .xf_valid, .xf_ready, .xf_am_base, .xf_wm_base, .xf_neg,
    .out_valid(dp_valid), .out_ready(dp_ready), .out_gtag(dp_gtag), .out_neg(dp_neg),
    .pat_we, .pat_waddr, .pat_wdata, .wm_we, .wm_waddr, .wm_wdata,
    .am_we, .am_waddr, .am_wdata, .busy(datapath_busy)
  );

  // route 0 keeps a delta on this core; any other route leaves it
  assign dp_local      = (dp_gtag[GTAG_W-1 -: ROUTE_BITS] == '0);
  assign fa_valid      = dp_valid && dp_local;
  assign acc_out_valid = dp_valid && !dp_local;
  assign acc_out_gtag  = dp_gtag;
  assign acc_out_neg   = dp_neg;
  assign dp_ready      = dp_local ? fa_ready : acc_out_ready;

  tag_fifo u_fifo (
    .clk, .rst_n,
    .a_valid(fa_valid), .a_ready(fa_ready), .a_tag(dp_gtag[TAG_W-1:0]), .a_neg(dp_neg),
    .b_valid(host_valid), .b_ready(host_ready), .b_tag(host_tag), .b_neg(host_neg),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data),
    .merged(fifo_merged), .full(fifo_full), .level(fifo_level)
  );

  tat_controller u_tatc (
    .clk, .rst_n,
    .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .xf_valid, .xf_ready, .xf_am_base, .xf_wm_base, .xf_neg,
    .syn_valid, .syn_ready, .syn_addr, .syn_neg,
    .rt_valid(rt_out_valid), .rt_ready(rt_out_ready), .rt_gtag(rt_out_gtag), .rt_neg(rt_out_neg),
    .tat_we, .tat_waddr, .tat_wdata, .busy(tat_busy)
  );

  aer_rx u_rx (
    .clk, .rst_n,
    .in_valid(syn_valid), .in_ready(syn_ready), .in_addr(syn_addr), .in_neg(syn_neg),
    .exc, .inh
  );

  config_memory u_cm (
    .clk, .rst_n, .wr_en(cm_we), .wr_tile(cm_wtile), .wr_data(cm_wdata), .cfg(cfg_bus)
  );

  // ---------------- analog array (behavioural) ----------------
  logic signed [15:0] syn_i  [SYNAPSES];
  logic signed [17:0] soma_i [NEURONS];

  for (genvar a = 0; a < SYNAPSES; a++) begin : g_syn
    // the filter's kill bit is bit 6 of the soma at its top-left corner
    localparam int SR = a / SYN_SIDE;
    localparam int SC = a % SYN_SIDE;
    localparam int R0 = 2 * SR;
    localparam int C0 = 2 * SC;
    localparam int N0 = ((R0 / 8) * 8 + (C0 / 8)) * 64 + (R0 % 8) * 8 + (C0 % 8);
    synaptic_filter_model u_f (
      .clk, .rst_n, .tick(analog_tick), .exc(exc[a]), .inh(inh[a]),
      .kill(cfg_bus[N0*CFG_W + 6]), .out(syn_i[a])
    );
  end

  diffusor_model #(.SYN_SIDE(SYN_SIDE)) u_diff (.syn_i, .soma_i);

  for (genvar n = 0; n < NEURONS; n++) begin : g_soma
    localparam int R  = ((n >> 9) & 7) * 8 + ((n >> 3) & 7);
    localparam int C  = ((n >> 6) & 7) * 8 + (n & 7);
    // fixed per-soma mismatch, a hash of the address spread over [-256, 255]
    localparam int MM = int'((32'(n) * 32'd2654435761) >> 23) - 256;
    soma_model #(.MISMATCH(MM)) u_s (
      .clk, .rst_n, .tick(analog_tick), .i_in(soma_i[R*NSIDE + C]), .bias(bias_dac),
      .cfg(cfg_bus[n*CFG_W +: 6]), .spike(soma_spikes[n])
    );
  end
endmodule
