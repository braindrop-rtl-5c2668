// braindrop_pkg: sizes, memory-word layouts and shared types of one Braindrop
// core. The numbers of neurons, subarrays, buckets, tags, synaptic filters and
// weights, and the field widths of the accumulator-memory word (15-bit state,
// 3-bit threshold code, 19-bit global tag, stop bit) and of the FIFO word
// (11-bit tag, 8-bit count, dirty bit), follow the architecture description.
// The PAT and TAT word layouts, the threshold encoding and the split of the
// global tag into route and local tag are this design's own choices.
package braindrop_pkg;

  // ---- array sizes ------------------------------------------------------
  localparam int unsigned NEURONS        = 4096;  // somas in the array
  localparam int unsigned SUBARRAYS      = 64;    // PAT entries
  localparam int unsigned NRN_PER_SUB    = 64;    // neurons per subarray
  localparam int unsigned SYNAPSES       = 1024;  // synaptic filters (1 per 4 somas)
  localparam int unsigned AM_WORDS       = 1024;  // accumulator buckets
  localparam int unsigned WM_WORDS       = 65536; // 64 KB of 8-bit weights
  localparam int unsigned TAT_WORDS      = 2048;  // tag action table entries
  localparam int unsigned FIFO_DEPTH     = 2048;  // tag FIFO entries
  localparam int unsigned TILES          = 256;   // 16-neuron tiles
  localparam int unsigned CM_TILE_BITS   = 128;   // configuration bits per tile
  localparam int unsigned ROUTE_BITS     = 8;     // route part of a global tag

  // ---- widths -------------------------------------------------------------
  localparam int unsigned NRN_AW   = $clog2(NEURONS);      // 12
  localparam int unsigned SUB_AW   = $clog2(SUBARRAYS);    // 6
  localparam int unsigned IDX_AW   = $clog2(NRN_PER_SUB);  // 6
  localparam int unsigned SYN_AW   = $clog2(SYNAPSES);     // 10
  localparam int unsigned AM_AW    = $clog2(AM_WORDS);     // 10
  localparam int unsigned WM_AW    = $clog2(WM_WORDS);     // 16
  localparam int unsigned TAG_W    = $clog2(TAT_WORDS);    // 11
  localparam int unsigned GTAG_W   = ROUTE_BITS + TAG_W;   // 19
  localparam int unsigned WEIGHT_W = 8;
  localparam int unsigned STATE_W  = 15;
  localparam int unsigned THR_W    = 3;
  localparam int unsigned COUNT_W  = 8;
  localparam int unsigned TILE_AW  = $clog2(TILES);        // 8
  localparam int unsigned CFG_W    = 8;                    // config bits per neuron

  // ---- memory words -------------------------------------------------------
  // PAT: base of the pool's weight block (in units of 64-weight rows) and base
  // bucket. Weight of dimension i for neuron n: WM[(wm_row + i)*64 + n].
  typedef struct packed {
    logic [WM_AW-IDX_AW-1:0] wm_row;   // 10 bits
    logic [AM_AW-1:0]        am_base;  // 10 bits
  } pat_entry_t;                       // 20 bits

  // AM: one accumulator bucket.
  typedef struct packed {
    logic                       stop;  // last bucket of a pool / transform
    logic [GTAG_W-1:0]          gtag;  // {route, local tag} emitted on a crossing
    logic [THR_W-1:0]           thr;   // threshold = 2^(7+thr) weight units
    logic signed [STATE_W-1:0]  state;
  } am_entry_t;                        // 38 bits

  // FIFO word.
  typedef struct packed {
    logic                      dirty;  // entry holds an event
    logic [TAG_W-1:0]          tag;
    logic signed [COUNT_W-1:0] count;  // signed number of unit deltas
  } fifo_entry_t;                      // 20 bits

  // TAT: one action; a tag's actions occupy consecutive entries ending with stop.
  typedef enum logic [1:0] {
    TAT_ACC   = 2'd0,  // transform: add a WM column into a list of buckets
    TAT_SYN   = 2'd1,  // sparse encode: up to two signed tap points
    TAT_ROUTE = 2'd2,  // send a global tag off the core
    TAT_NOP   = 2'd3
  } tat_kind_e;

  typedef struct packed {
    logic             valid;
    logic             neg;             // tap's anchor sign
    logic [SYN_AW-1:0] addr;
  } tap_t;                             // 12 bits

  localparam int unsigned TAT_PAYLOAD_W = 26;

  typedef struct packed {
    logic                     stop;
    tat_kind_e                kind;
    logic [TAT_PAYLOAD_W-1:0] payload;
  } tat_entry_t;                       // 29 bits

  // payload views
  typedef struct packed {
    logic [AM_AW-1:0] am_base;         // 10
    logic [WM_AW-1:0] wm_base;         // 16: weight of bucket i at WM[wm_base+i]
  } tat_acc_t;

  typedef struct packed {
    logic [1:0] pad;
    tap_t       tap1;
    tap_t       tap0;
  } tat_syn_t;

  typedef struct packed {
    logic [TAT_PAYLOAD_W-GTAG_W-1:0] pad;
    logic [GTAG_W-1:0]               gtag;
  } tat_route_t;

  // Accumulator threshold in weight units (a weight of 128 is 1.0 at thr=0).
  function automatic int unsigned acc_threshold(input logic [THR_W-1:0] thr);
    return 32'd1 << (7 + thr);
  endfunction

endpackage
