// tb_weight_memory: fills all 65536 weights with an address-derived pattern,
// reads random addresses back and checks data and the one-cycle read
// latency, and checks that rd_data holds while rd_en is low.
module tb_weight_memory;
  import braindrop_pkg::*;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [15:0] rd_addr = 0, wr_addr = 0;
  logic signed [7:0] rd_data, wr_data = 0;
  int checks = 0, failures = 0;

  weight_memory dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37) ^ (a >> 8));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    @(negedge clk);
    for (int i = 0; i < 65536; i++) begin
      wr_en = 1; wr_addr = 16'(i); wr_data = pat(i);
      @(negedge clk);
    end
    wr_en = 0;
    for (int k = 0; k < 2000; k++) begin
      automatic int a = $urandom_range(0, 65535);
      rd_en = 1; rd_addr = 16'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data != pat(a)) begin failures++; $display("FAIL addr %0d", a); end
    end
    held = rd_data; rd_addr = rd_addr + 1;
    @(negedge clk);
    checks++; if (rd_data != held) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
