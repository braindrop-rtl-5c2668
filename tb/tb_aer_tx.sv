// tb_aer_tx: drives random spike pulses on the 4096 inputs and checks that
// every spike appears exactly once on the address-event output unless it
// collided with a still-pending spike of the same soma (which must then be
// flagged), that each event is the lowest pending address of the first
// pending 64-soma group at or after the group following the last one served
// (round-robin), that the output holds while out_ready is low, and
// that a free output sends one event per cycle.
module tb_aer_tx;
  import braindrop_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4095:0] spike = '0;
  logic out_valid, out_ready = 1, collision;
  logic [11:0] out_addr;
  int checks = 0, failures = 0;
  bit pend [4096];
  int n_ev = 0, n_col = 0, n_hold = 0, burst_cycles = 0;

  aer_tx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: the event registered at this edge is the lowest pending address
  logic [11:0] last_addr;
  int rr = 0;
  bit last_hold;
  always @(posedge clk) if (rst_n) begin
    int lowest, col;
    bit take;
    lowest = -1;
    col = 0;
    if (out_valid && !out_ready) begin last_hold = 1; last_addr = out_addr; n_hold++; end
    else last_hold = 0;
    for (int j = 0; j < 64 && lowest < 0; j++) begin
      int g;
      g = (rr + j) % 64;
      for (int i = 0; i < 64; i++) if (pend[g*64 + i]) begin lowest = g*64 + i; break; end
    end
    take = (lowest >= 0) && (!out_valid || out_ready);
    if (out_valid && out_ready) n_ev++;
    if (take) begin pend[lowest] = 0; rr = (lowest / 64 + 1) % 64; end
    for (int i = 0; i < 4096; i++) if (spike[i]) begin
      if (pend[i]) col++;
      pend[i] = 1;
    end
    #1;
    if (take) begin
      checks++;
      if (!out_valid || int'(out_addr) != lowest) begin failures++; $display("FAIL event %0d exp %0d", out_addr, lowest); end
    end
    if (last_hold) begin
      checks++;
      if (!out_valid || out_addr != last_addr) begin failures++; $display("FAIL hold"); end
    end
    if (col > 0) n_col++;
    checks++;
    if (collision != (col > 0)) begin failures++; $display("FAIL collision flag"); end
  end

  initial begin
    int t0;
    for (int i = 0; i < 4096; i++) pend[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      spike = '0;
      if ($urandom_range(0, 1)) spike[$urandom_range(0, 4095)] = 1'b1;
      if ($urandom_range(0, 3) == 0) spike[$urandom_range(0, 63)] = 1'b1;
      out_ready = 1'($urandom_range(0, 3) != 0);
    end
    // burst: 100 spikes at once must leave in 100 cycles
    @(negedge clk); spike = '0; out_ready = 1;
    repeat (200) @(negedge clk);
    for (int i = 0; i < 100; i++) spike[i * 41] = 1'b1;
    @(negedge clk); spike = '0;
    t0 = n_ev;
    repeat (101) @(negedge clk);
    checks++;
    if (n_ev - t0 != 100) begin failures++; $display("FAIL burst rate %0d", n_ev - t0); end
    repeat (5) @(negedge clk);
    checks++;
    if (n_col == 0 || n_hold == 0) begin failures++; $display("FAIL coverage"); end
    $display("events=%0d collisions=%0d holds=%0d", n_ev, n_col, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
