// tb_aer_rx: sends random signed synaptic events and checks that exactly the
// addressed filter's excitatory (positive) or inhibitory (negative) line
// pulses for one cycle, one cycle after the event, and nothing pulses when
// no event is sent.
module tb_aer_rx;
  import braindrop_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_neg = 0;
  logic [9:0] in_addr = 0;
  logic [1023:0] exc, inh;
  int checks = 0, failures = 0;

  aer_rx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1023:0] e_exc, e_inh;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(0, 3) != 0);
      in_addr  = 10'($urandom);
      in_neg   = 1'($urandom);
      e_exc = '0; e_inh = '0;
      if (in_valid) begin
        if (in_neg) e_inh[in_addr] = 1'b1; else e_exc[in_addr] = 1'b1;
      end
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready"); end
      @(posedge clk); #1;
      checks++;
      if (exc != e_exc || inh != e_inh) begin failures++; $display("FAIL pulse at %0d neg=%b", in_addr, in_neg); end
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks++;
    if (exc != '0 || inh != '0) begin failures++; $display("FAIL pulse not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
