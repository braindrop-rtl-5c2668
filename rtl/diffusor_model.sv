// diffusor_model: behavioural model of the diffusor, the transistor
// resistive mesh that spreads each synaptic filter's output current over the
// somas around it, with a current that decays with distance. Not a circuit
// design: the mesh is replaced by a fixed kernel. Filters sit on a
// SYN_SIDE x SYN_SIDE grid, one per 2x2 block of somas on a
// 2*SYN_SIDE-wide soma grid. A soma receives its own filter's current in
// full and each of the eight neighbouring filters' currents attenuated by
// 2^(SPACE_SHIFT * d), d = Manhattan distance (1 or 2) in filter units. The
// convolution idea follows the architecture; the kernel's shape and size,
// the square instead of hexagonal grid and the absence of pool-boundary
// cuts are this model's simplifications.
// Purely combinational. Soma (r, c) is output index r*2*SYN_SIDE + c.
module diffusor_model #(
  parameter int SYN_SIDE    = 32,
  parameter int SPACE_SHIFT = 1
) (
  input  logic signed [15:0] syn_i  [SYN_SIDE*SYN_SIDE],
  output logic signed [17:0] soma_i [4*SYN_SIDE*SYN_SIDE]
);
  localparam int NSIDE = 2 * SYN_SIDE;

  always_comb begin
    for (int r = 0; r < NSIDE; r++) begin
      for (int c = 0; c < NSIDE; c++) begin
        automatic logic signed [17:0] s = '0;
        for (int dr = -1; dr <= 1; dr++) begin
          for (int dc = -1; dc <= 1; dc++) begin
            automatic int sr = r / 2 + dr;
            automatic int sc = c / 2 + dc;
            automatic int d  = (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
            if (sr >= 0 && sr < SYN_SIDE && sc >= 0 && sc < SYN_SIDE)
              s = s + (18'(syn_i[sr*SYN_SIDE + sc]) >>> (SPACE_SHIFT * d));
          end
        end
        soma_i[r*NSIDE + c] = s;
      end
    end
  end
endmodule
