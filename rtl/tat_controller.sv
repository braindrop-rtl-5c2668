// tat_controller: executes the tag action table. It pops a word {tag, count}
// from the tag FIFO and runs the tag's action list |count| times with the
// count's sign: a transform entry becomes a request to the accumulator
// datapath (negated for -1 deltas), a tap-point entry sends up to two signed
// deltas to synaptic filters through the AER receiver (the delta's sign is
// flipped for a negative tap), and a route entry sends the stored global tag
// off the core. Words whose count has cancelled to zero are dropped. The
// three action types follow the architecture; replaying the list once per
// unit of count, the entry layout and the handshakes are this design's own.
// Words without the dirty bit are dropped as well.
// Timing: one cycle from pop to the first entry's read data, then one cycle
// per entry plus one per emitted delta or transform while the receiver is
// ready. The table itself lives in tag_action_table.
module tat_controller
  import braindrop_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // from the tag FIFO
  input  logic                 in_valid,
  output logic                 in_ready,
  input  fifo_entry_t          in_data,
  // transform requests to the accumulator datapath
  output logic                 xf_valid,
  input  logic                 xf_ready,
  output logic [AM_AW-1:0]     xf_am_base,
  output logic [WM_AW-1:0]     xf_wm_base,
  output logic                 xf_neg,
  // synaptic-filter deltas to the AER receiver
  output logic                 syn_valid,
  input  logic                 syn_ready,
  output logic [SYN_AW-1:0]    syn_addr,
  output logic                 syn_neg,
  // global-route deltas off the core
  output logic                 rt_valid,
  input  logic                 rt_ready,
  output logic [GTAG_W-1:0]    rt_gtag,
  output logic                 rt_neg,
  // TAT configuration
  input  logic                 tat_we,
  input  logic [TAG_W-1:0]     tat_waddr,
  input  tat_entry_t           tat_wdata,
  output logic                 busy
);
  typedef enum logic {S_IDLE, S_EXEC} state_e;
  state_e state;

  logic [TAG_W-1:0]   tag_l, addr_q;
  logic               neg_l;
  logic [COUNT_W:0]   remaining;
  logic               sub;
  tat_entry_t         e;
  logic               rd_en;
  logic [TAG_W-1:0]   rd_addr;
  logic               act_done, tap_step, last_pass;
  tap_t               tap;
  tat_acc_t           acc_p;
  tat_syn_t           syn_p;
  tat_route_t         rt_p;
  logic               pop_ok;

  tag_action_table u_tat (
    .clk, .rd_en, .rd_addr, .rd_data(e),
    .wr_en(tat_we), .wr_addr(tat_waddr), .wr_data(tat_wdata)
  );

  assign acc_p = tat_acc_t'(e.payload);
  assign syn_p = tat_syn_t'(e.payload);
  assign rt_p  = tat_route_t'(e.payload);
  assign tap   = sub ? syn_p.tap1 : syn_p.tap0;

  assign in_ready = (state == S_IDLE);
  assign pop_ok   = in_valid && in_data.dirty && (in_data.count != '0);
  assign busy     = (state != S_IDLE);

  assign xf_am_base = acc_p.am_base;
  assign xf_wm_base = acc_p.wm_base;
  assign xf_neg     = neg_l;
  assign syn_addr   = tap.addr;
  assign syn_neg    = neg_l ^ tap.neg;
  assign rt_gtag    = rt_p.gtag;
  assign rt_neg     = neg_l;
  assign last_pass  = (remaining == (COUNT_W+1)'(1));

  always_comb begin
    xf_valid  = 1'b0;
    syn_valid = 1'b0;
    rt_valid  = 1'b0;
    act_done  = 1'b0;
    tap_step  = 1'b0;
    if (state == S_EXEC) begin
      unique case (e.kind)
        TAT_ACC:   begin xf_valid = 1'b1; act_done = xf_ready; end
        TAT_SYN:   begin
          syn_valid = tap.valid;
          tap_step  = !tap.valid || syn_ready;
          act_done  = tap_step && sub;
        end
        TAT_ROUTE: begin rt_valid = 1'b1; act_done = rt_ready; end
        default:   act_done = 1'b1;
      endcase
    end
    rd_en   = 1'b0;
    rd_addr = addr_q;
    if (state == S_IDLE && pop_ok) begin
      rd_en   = 1'b1;
      rd_addr = in_data.tag;
    end else if (state == S_EXEC && act_done && !(e.stop && last_pass)) begin
      rd_en   = 1'b1;
      rd_addr = e.stop ? tag_l : addr_q + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tag_l     <= '0;
      addr_q    <= '0;
      neg_l     <= 1'b0;
      remaining <= '0;
      sub       <= 1'b0;
    end else begin
      if (rd_en) addr_q <= rd_addr;
      unique case (state)
        S_IDLE: if (pop_ok) begin
          tag_l     <= in_data.tag;
          neg_l     <= in_data.count[COUNT_W-1];
          remaining <= in_data.count[COUNT_W-1] ? -(COUNT_W+1)'(in_data.count)
                                                :  (COUNT_W+1)'(in_data.count);
          sub       <= 1'b0;
          state     <= S_EXEC;
        end
        S_EXEC: begin
          if (e.kind == TAT_SYN && tap_step && !sub) sub <= 1'b1;
          if (act_done) begin
            sub <= 1'b0;
            if (e.stop) begin
              remaining <= remaining - 1'b1;
              if (last_pass) state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
