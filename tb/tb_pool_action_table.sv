// tb_pool_action_table: writes random entries to all 64 PAT words, reads
// them back in random order and checks data and the one-cycle read latency;
// also checks the reset value.
module tb_pool_action_table;
  import braindrop_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0;
  pat_entry_t rd_data, wr_data;
  pat_entry_t ref_mem [64];
  int checks = 0, failures = 0;

  pool_action_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); rd_en = 1; rd_addr = 6'd17;
    @(negedge clk); rd_en = 0;
    checks++; if (rd_data != '0) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 64; i++) begin
      ref_mem[i] = pat_entry_t'($urandom);
      wr_en = 1; wr_addr = 6'(i); wr_data = ref_mem[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int k = 0; k < 500; k++) begin
      automatic int a = $urandom_range(0, 63);
      rd_en = 1; rd_addr = 6'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data != ref_mem[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
