// tb_tag_action_table: writes random entries to all 2048 TAT words and reads
// them back in random order, checking data and one-cycle read latency.
module tb_tag_action_table;
  import braindrop_pkg::*;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [10:0] rd_addr = 0, wr_addr = 0;
  tat_entry_t rd_data, wr_data = '0;
  tat_entry_t ref_mem [2048];
  int checks = 0, failures = 0;

  tag_action_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 2048; i++) begin
      ref_mem[i] = tat_entry_t'($urandom);
      wr_en = 1; wr_addr = 11'(i); wr_data = ref_mem[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int k = 0; k < 3000; k++) begin
      automatic int a = $urandom_range(0, 2047);
      rd_en = 1; rd_addr = 11'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data != ref_mem[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
