// tb_diffusor_model: on a 4x4 filter grid (8x8 somas) checks the kernel with
// a single active filter (full current under it, half at edge neighbours,
// a quarter at corners, zero beyond), then compares random inputs on all
// filters with a reference convolution.
module tb_diffusor_model;
  localparam int S = 4;
  logic signed [15:0] syn_i [S*S];
  logic signed [17:0] soma_i [4*S*S];
  int checks = 0, failures = 0;

  diffusor_model #(.SYN_SIDE(S)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_at(int r, int c);
    int s = 0;
    for (int sr = 0; sr < S; sr++)
      for (int sc = 0; sc < S; sc++) begin
        int dr = sr - r / 2, dc = sc - c / 2;
        if (dr >= -1 && dr <= 1 && dc >= -1 && dc <= 1)
          s += int'(syn_i[sr*S + sc]) >>> ((dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc));
      end
    return s;
  endfunction

  initial begin
    for (int a = 0; a < S*S; a++) syn_i[a] = 0;
    syn_i[1*S + 1] = 1024;
    #1;
    for (int r = 0; r < 2*S; r++)
      for (int c = 0; c < 2*S; c++) begin
        automatic int dr = r / 2 - 1, dc = c / 2 - 1; int e;
        automatic int d = (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
        if ((dr < -1 || dr > 1) || (dc < -1 || dc > 1)) e = 0;
        else e = 1024 >> d;
        checks++;
        if (int'(soma_i[r*2*S + c]) != e) begin failures++; $display("FAIL kernel (%0d,%0d) %0d exp %0d", r, c, soma_i[r*2*S+c], e); end
      end
    for (int k = 0; k < 50; k++) begin
      for (int a = 0; a < S*S; a++) syn_i[a] = 16'($urandom_range(0, 65535));
      #1;
      for (int r = 0; r < 2*S; r++)
        for (int c = 0; c < 2*S; c++) begin
          checks++;
          if (int'(soma_i[r*2*S + c]) != ref_at(r, c)) begin failures++; $display("FAIL random (%0d,%0d)", r, c); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
