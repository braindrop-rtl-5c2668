// tb_tat_controller: programs action lists for a few tags (tap points with
// both signs, a transform, a global route, an empty action) and feeds FIFO
// words with counts of both signs and several magnitudes, including a zero
// count that must be dropped. A reference expands each word into the
// expected sequence of transform requests, synaptic deltas and route deltas
// (list replayed |count| times, sign applied, tap sign flips the delta),
// which is compared in order with the DUT's outputs. With every receiver
// ready it checks the busy time of each word (1 cycle per transform, route
// or empty entry, 2 per tap-point entry, per pass); then it repeats with
// random back-pressure.
module tb_tat_controller;
  import braindrop_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  fifo_entry_t in_data = '0;
  logic xf_valid, xf_ready = 1, xf_neg;
  logic [9:0] xf_am_base;
  logic [15:0] xf_wm_base;
  logic syn_valid, syn_ready = 1, syn_neg;
  logic [9:0] syn_addr;
  logic rt_valid, rt_ready = 1, rt_neg;
  logic [18:0] rt_gtag;
  logic tat_we = 0;
  logic [10:0] tat_waddr = 0;
  tat_entry_t tat_wdata = '0;
  logic busy;
  int checks = 0, failures = 0;
  longint exp_q [$];
  int n_xf = 0, n_syn = 0, n_rt = 0, n_stall = 0;
  bit random_ready = 0;

  tat_controller dut (.*);
  always #5 clk = ~clk;

  // reference copy of the table
  tat_entry_t tab [2048];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, tat_entry_t e);
    tab[a] = e;
    @(negedge clk); tat_we = 1; tat_waddr = 11'(a); tat_wdata = e;
    @(negedge clk); tat_we = 0;
  endtask

  function automatic tat_entry_t syn_e(bit stop, bit v0, bit n0, int a0, bit v1, bit n1, int a1);
    tat_syn_t p;
    p.pad = '0;
    p.tap0 = '{valid: v0, neg: n0, addr: 10'(a0)};
    p.tap1 = '{valid: v1, neg: n1, addr: 10'(a1)};
    return '{stop: stop, kind: TAT_SYN, payload: 26'(p)};
  endfunction
  function automatic tat_entry_t acc_e(bit stop, int am, int wm);
    tat_acc_t p = '{am_base: 10'(am), wm_base: 16'(wm)};
    return '{stop: stop, kind: TAT_ACC, payload: 26'(p)};
  endfunction
  function automatic tat_entry_t rt_e(bit stop, int g);
    tat_route_t p = '{pad: '0, gtag: 19'(g)};
    return '{stop: stop, kind: TAT_ROUTE, payload: 26'(p)};
  endfunction

  // events: kind<<40 | fields
  function automatic longint ev_xf(int am, int wm, bit n);  return (64'd1 << 40) | (longint'(am) << 20) | (longint'(wm) << 1) | n; endfunction
  function automatic longint ev_syn(int a, bit n);          return (64'd2 << 40) | (longint'(a) << 1) | n; endfunction
  function automatic longint ev_rt(int g, bit n);           return (64'd3 << 40) | (longint'(g) << 1) | n; endfunction

  // expand one FIFO word; returns the expected busy cycles
  function automatic int expand(int tag, int count);
    int cyc = 0;
    bit neg = count < 0;
    int m = neg ? -count : count;
    for (int p = 0; p < m; p++) begin
      int a = tag;
      forever begin
        tat_entry_t e = tab[a];
        unique case (e.kind)
          TAT_ACC: begin tat_acc_t q = tat_acc_t'(e.payload); exp_q.push_back(ev_xf(int'(q.am_base), int'(q.wm_base), neg)); cyc += 1; end
          TAT_SYN: begin
            tat_syn_t q = tat_syn_t'(e.payload);
            if (q.tap0.valid) exp_q.push_back(ev_syn(int'(q.tap0.addr), neg ^ q.tap0.neg));
            if (q.tap1.valid) exp_q.push_back(ev_syn(int'(q.tap1.addr), neg ^ q.tap1.neg));
            cyc += 2;
          end
          TAT_ROUTE: begin tat_route_t q = tat_route_t'(e.payload); exp_q.push_back(ev_rt(int'(q.gtag), neg)); cyc += 1; end
          default: cyc += 1;
        endcase
        if (e.stop) break;
        a++;
      end
    end
    return cyc;
  endfunction

  task automatic check_ev(longint got);
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected event %h", got); end
    else begin
      longint e = exp_q.pop_front();
      if (e != got) begin failures++; $display("FAIL event got %h exp %h", got, e); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (xf_valid && xf_ready) begin n_xf++; check_ev(ev_xf(int'(xf_am_base), int'(xf_wm_base), xf_neg)); end
    if (syn_valid && syn_ready) begin n_syn++; check_ev(ev_syn(int'(syn_addr), syn_neg)); end
    if (rt_valid && rt_ready) begin n_rt++; check_ev(ev_rt(int'(rt_gtag), rt_neg)); end
    if ((xf_valid && !xf_ready) || (syn_valid && !syn_ready) || (rt_valid && !rt_ready)) n_stall++;
    checks++;
    if (int'(xf_valid) + int'(syn_valid) + int'(rt_valid) > 1) begin failures++; $display("FAIL two outputs at once"); end
  end

  always @(negedge clk) if (random_ready) begin
    xf_ready  = 1'($urandom_range(0, 2) != 0);
    syn_ready = 1'($urandom_range(0, 2) != 0);
    rt_ready  = 1'($urandom_range(0, 2) != 0);
  end

  task automatic send(int tag, int count, bit timed);
    int cyc, exp_cyc;
    exp_cyc = expand(tag, count);
    @(negedge clk);
    in_valid = 1; in_data = '{dirty: 1'b1, tag: 11'(tag), count: 8'(count)};
    @(posedge clk); while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    if (timed) begin
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL tag %0d count %0d busy %0d exp %0d", tag, count, cyc, exp_cyc); end
    end
  endtask

  initial begin
    int tags [5] = '{5, 9, 100, 7, 2047};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(5, syn_e(0, 1, 0, 10, 1, 1, 20));
    wr(6, acc_e(0, 300, 1000));
    wr(7, rt_e(1, 19'h12345));           // tag 7 is also the tail of tag 5's list
    wr(9, syn_e(1, 1, 0, 7, 0, 0, 0));
    wr(100, '{stop: 1'b1, kind: TAT_NOP, payload: '0});
    wr(2047, syn_e(0, 0, 0, 0, 1, 1, 1023));
    wr(0, acc_e(1, 1023, 65535));        // address wraps from 2047 to 0
    for (int k = 0; k < 60; k++) begin
      automatic int c = $urandom_range(0, 6) - 3;
      send(tags[$urandom_range(0, 4)], c, 1);
    end
    send(5, -128, 1);
    send(9, 127, 1);
    random_ready = 1;
    for (int k = 0; k < 80; k++) send(tags[$urandom_range(0, 4)], $urandom_range(0, 8) - 4, 0);
    random_ready = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d events missing", exp_q.size()); end
    checks++;
    if (n_xf == 0 || n_syn == 0 || n_rt == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("xf=%0d syn=%0d rt=%0d stalls=%0d", n_xf, n_syn, n_rt, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
