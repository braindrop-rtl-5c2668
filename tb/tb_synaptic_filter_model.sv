// tb_synaptic_filter_model: feeds random excitatory and inhibitory pulses and
// ticks into the filter and compares its output every cycle with an integer
// reference of the leaky integrator (decay by x/16 per tick, +/-64 per
// delta); then checks the step response decays towards zero once input
// stops, and that kill clears the output.
module tb_synaptic_filter_model;
  logic clk = 0, rst_n = 0, tick = 0, exc = 0, inh = 0, kill = 0;
  logic signed [15:0] out;
  int checks = 0, failures = 0;
  int x = 0;

  synaptic_filter_model dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit t, bit e, bit i);
    @(negedge clk); tick = t; exc = e; inh = i;
    if (t) x = x - (x >>> 4);
    if (e) x = x + 64;
    if (i) x = x - 64;
    if (x > 32767) x = 32767;
    if (x < -32768) x = -32768;
    @(posedge clk); #1;
    checks++;
    if (int'(out) != x) begin failures++; $display("FAIL out %0d exp %0d", out, x); end
  endtask

  initial begin
    int peak;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++)
      step(1'($urandom_range(0, 3) == 0), 1'($urandom_range(0, 2) == 0), 1'($urandom_range(0, 5) == 0));
    // saturating burst
    for (int k = 0; k < 700; k++) step(0, 1, 0);
    peak = x;
    for (int k = 0; k < 400; k++) step(1, 0, 0);
    checks++;
    if (!(peak == 32767 && x < 100 && x >= 0)) begin failures++; $display("FAIL decay peak=%0d end=%0d", peak, x); end
    for (int k = 0; k < 5; k++) step(0, 1, 0);
    @(negedge clk) kill = 1; tick = 0; exc = 0; inh = 0;
    @(posedge clk); #1;
    checks++;
    if (out != 0) begin failures++; $display("FAIL kill"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
