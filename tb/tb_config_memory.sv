// tb_config_memory: checks that all bits are zero after reset, then writes
// every tile with random data (some tiles twice) and checks that the output
// bus shows each tile's last write at its position and that a write touches
// only its own tile.
module tb_config_memory;
  import braindrop_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [7:0] wr_tile = 0;
  logic [127:0] wr_data = '0;
  logic [256*128-1:0] cfg;
  logic [127:0] ref_t [256];
  int checks = 0, failures = 0;

  config_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (cfg != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 256; t++) ref_t[t] = '0;
    for (int k = 0; k < 600; k++) begin
      automatic int t = (k < 256) ? k : $urandom_range(0, 255);
      @(negedge clk);
      wr_en = 1; wr_tile = 8'(t); wr_data = rnd(); ref_t[t] = wr_data;
      @(negedge clk);
      wr_en = 0;
      checks++;
      for (int u = 0; u < 256; u++)
        if (cfg[u*128 +: 128] != ref_t[u]) begin failures++; $display("FAIL tile %0d after write %0d", u, t); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
