// accum_datapath: the decode and transform engine of the core (the "TX + PAT
// + Acc" path). It owns the pool action table, the weight memory and the
// accumulator memory and serves two kinds of request:
//  * a soma spike {subarray, neuron}: the PAT entry of the subarray gives the
//    pool's weight rows and first bucket; for bucket i the neuron's weight is
//    WM[(wm_row+i)*64 + neuron] (its decoding vector, one 8-bit weight per
//    dimension);
//  * a transform request from the tag action table {am_base, wm_base, neg}:
//    bucket i adds WM[wm_base+i] (a transform column), negated when the
//    incoming tag was a -1 delta.
// Buckets are walked from the base until one whose stop bit is set. Each
// bucket is read, updated by acc_update and written back; when it crosses
// threshold its 19-bit global tag and the delta's sign leave on the out port.
// Indirection through PAT and per-bucket tags follows the architecture; the
// weight layout, the stop-bit walk and the priority of transforms over
// spikes (so that the tag FIFO drains) are this design's choices.
// Timing: a spike takes 1 cycle of PAT lookup, then 2 cycles per bucket
// (read, update) plus one cycle per emitted tag if out_ready is high;
// a transform skips the PAT cycle. Requests are accepted only when idle.
module accum_datapath
  import braindrop_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // spikes from the AER transmitter
  input  logic                        spk_valid,
  output logic                        spk_ready,
  input  logic [NRN_AW-1:0]           spk_addr,
  // transforms from the tag action table
  input  logic                        xf_valid,
  output logic                        xf_ready,
  input  logic [AM_AW-1:0]            xf_am_base,
  input  logic [WM_AW-1:0]            xf_wm_base,
  input  logic                        xf_neg,
  // thinned output deltas
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [GTAG_W-1:0]           out_gtag,
  output logic                        out_neg,
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
  output logic                        busy
);
  typedef enum logic [2:0] {S_IDLE, S_PAT, S_READ, S_UPD, S_EMIT} state_e;
  state_e state;

  logic [AM_AW-1:0]   am_addr;
  logic [WM_AW-1:0]   wm_addr, wm_step;
  logic               neg_l;
  logic [IDX_AW-1:0]  nrn_idx;
  logic               stop_l;

  pat_entry_t pat_q;
  am_entry_t  am_q, am_new;
  logic signed [WEIGHT_W-1:0] w_q;
  logic signed [WEIGHT_W:0]   w_eff;
  logic signed [STATE_W-1:0]  st_new;
  logic fire_p, fire_n;

  pool_action_table u_pat (
    .clk, .rst_n,
    .rd_en  (state == S_IDLE && spk_valid && spk_ready),
    .rd_addr(spk_addr[NRN_AW-1 -: SUB_AW]),
    .rd_data(pat_q),
    .wr_en  (pat_we), .wr_addr(pat_waddr), .wr_data(pat_wdata)
  );

  weight_memory u_wm (
    .clk,
    .rd_en(state == S_READ), .rd_addr(wm_addr), .rd_data(w_q),
    .wr_en(wm_we), .wr_addr(wm_waddr), .wr_data(wm_wdata)
  );

  accumulator_memory u_am (
    .clk,
    .rd_en   (state == S_READ), .rd_addr(am_addr), .rd_data(am_q),
    .upd_en  (state == S_UPD),  .upd_addr(am_addr), .upd_data(am_new),
    .cfg_en  (am_we), .cfg_addr(am_waddr), .cfg_data(am_wdata)
  );

  assign w_eff = neg_l ? -(WEIGHT_W+1)'(w_q) : (WEIGHT_W+1)'(w_q);

  acc_update u_acc (
    .state_in(am_q.state), .weight(w_eff), .thr(am_q.thr),
    .state_out(st_new), .fire_pos(fire_p), .fire_neg(fire_n)
  );

  always_comb begin
    am_new       = am_q;
    am_new.state = st_new;
  end

  assign xf_ready  = (state == S_IDLE);
  assign spk_ready = (state == S_IDLE) && !xf_valid;
  assign out_valid = (state == S_EMIT);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      am_addr  <= '0;
      wm_addr  <= '0;
      wm_step  <= '0;
      neg_l    <= 1'b0;
      nrn_idx  <= '0;
      stop_l   <= 1'b0;
      out_gtag <= '0;
      out_neg  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (xf_valid) begin
            am_addr <= xf_am_base;
            wm_addr <= xf_wm_base;
            wm_step <= WM_AW'(1);
            neg_l   <= xf_neg;
            state   <= S_READ;
          end else if (spk_valid) begin
            nrn_idx <= spk_addr[IDX_AW-1:0];
            neg_l   <= 1'b0;
            state   <= S_PAT;
          end
        end
        S_PAT: begin
          am_addr <= pat_q.am_base;
          wm_addr <= {pat_q.wm_row, nrn_idx};
          wm_step <= WM_AW'(NRN_PER_SUB);
          state   <= S_READ;
        end
        S_READ: state <= S_UPD;
        S_UPD: begin
          stop_l <= am_q.stop;
          if (fire_p || fire_n) begin
            out_gtag <= am_q.gtag;
            out_neg  <= fire_n;
            state    <= S_EMIT;
          end else if (am_q.stop) begin
            state <= S_IDLE;
          end else begin
            am_addr <= am_addr + 1'b1;
            wm_addr <= wm_addr + wm_step;
            state   <= S_READ;
          end
        end
        S_EMIT: begin
          if (out_ready) begin
            if (stop_l) state <= S_IDLE;
            else begin
              am_addr <= am_addr + 1'b1;
              wm_addr <= wm_addr + wm_step;
              state   <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A delta on the output holds steady until it is taken.
  property p_out_stable;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_gtag) && $stable(out_neg);
  endproperty
  a_out_stable: assert property (p_out_stable);
endmodule
