// tb_accumulator_memory: writes every bucket through the configuration
// port, overwrites some through the update port (including same-cycle
// collisions, where the update port must win) and reads all back.
module tb_accumulator_memory;
  import braindrop_pkg::*;
  logic clk = 0;
  logic rd_en = 0, upd_en = 0, cfg_en = 0;
  logic [9:0] rd_addr = 0, upd_addr = 0, cfg_addr = 0;
  am_entry_t rd_data, upd_data = '0, cfg_data = '0;
  am_entry_t ref_mem [1024];
  int checks = 0, failures = 0;

  accumulator_memory dut (.*);
  always #5 clk = ~clk;

  function automatic am_entry_t rnd();
    return am_entry_t'({$urandom, $urandom});
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      ref_mem[i] = rnd();
      cfg_en = 1; cfg_addr = 10'(i); cfg_data = ref_mem[i];
      @(negedge clk);
    end
    cfg_en = 0;
    for (int k = 0; k < 300; k++) begin
      automatic int a = $urandom_range(0, 1023);
      upd_en = 1; upd_addr = 10'(a); upd_data = rnd(); ref_mem[a] = upd_data;
      if (k % 3 == 0) begin cfg_en = 1; cfg_addr = 10'(a); cfg_data = rnd(); end
      @(negedge clk);
      upd_en = 0; cfg_en = 0;
    end
    for (int i = 0; i < 1024; i++) begin
      rd_en = 1; rd_addr = 10'(i);
      @(negedge clk);
      checks++;
      if (rd_data != ref_mem[i]) begin failures++; $display("FAIL addr %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
