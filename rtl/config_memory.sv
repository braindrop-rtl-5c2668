// config_memory (CM): the write-only configuration bits held in every
// 16-neuron tile, 128 bits per tile, 8 bits per neuron, 256 tiles. The bits
// drive switches in the analog circuits directly, so every bit is always
// visible on the output bus. Per neuron n, byte n of the bus is:
//   [2:0] soma offset code, 0..6 = -3..+3 bias units (7 = 0)
//   [4:3] soma attenuation, 1, 1/2, 1/3, 1/4
//   [5]   kill the soma
//   [6]   kill the synaptic filter (read from the first neuron of each
//         2x2 group, which shares one filter)
//   [7]   route this neuron to the ADC (no ADC is modelled)
// Tile size, bit count and the meaning of the switches follow the
// architecture; the bit assignment is this design's choice.
// Interface: one tile written per cycle; all bits reset to zero.
module config_memory
  import braindrop_pkg::*;
#(
  parameter int unsigned TILES_P   = TILES,
  parameter int unsigned TILE_BITS = CM_TILE_BITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(TILES_P)-1:0]   wr_tile,
  input  logic [TILE_BITS-1:0]         wr_data,
  output logic [TILES_P*TILE_BITS-1:0] cfg
);
  logic [TILE_BITS-1:0] bits [TILES_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(TILES_P); t++) bits[t] <= '0;
    end else if (wr_en) begin
      bits[wr_tile] <= wr_data;
    end
  end

  always_comb
    for (int t = 0; t < int'(TILES_P); t++)
      cfg[t*TILE_BITS +: TILE_BITS] = bits[t];
endmodule
