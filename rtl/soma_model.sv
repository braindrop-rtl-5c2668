// soma_model: behavioural model of one analog spiking soma with its digital
// correction. Not a circuit design: an integrate-and-fire neuron in fixed
// point. On every analog time step (tick) the soma adds its drive, the
// input current plus the global bias, its own fixed mismatch (MISMATCH) and
// the programmed offset, scaled by the programmed attenuation, to its
// potential, loses 1/2^LEAK_SHIFT of the potential, is clipped at zero, and
// spikes (a one-cycle pulse) when the potential reaches VTH, which is then
// subtracted. Configuration bits select one of seven offsets (-3..+3 units
// of OFFSET_UNIT), one of four attenuations (1, 1/2, 1/3, 1/4) or kill the
// soma, as the architecture describes; the neuron dynamics, constants and
// bit encoding (see config_memory) are this model's choices.
module soma_model #(
  parameter int MISMATCH    = 0,
  parameter int OFFSET_UNIT = 16,
  parameter int VTH         = 4096,
  parameter int LEAK_SHIFT  = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic signed [17:0] i_in,
  input  logic signed [15:0] bias,
  input  logic [5:0]         cfg,     // [2:0] offset, [4:3] attenuation, [5] kill
  output logic               spike
);
  logic signed [21:0] drive, scaled, v, v_nxt;
  logic signed [21:0] offs;
  logic signed [29:0] third;

  always_comb begin
    offs  = (cfg[2:0] == 3'd7) ? 22'sd0 : 22'(signed'({1'b0, cfg[2:0]}) - 4'sd3) * 22'(OFFSET_UNIT);
    drive = 22'(i_in) + 22'(bias) + 22'(MISMATCH) + offs;
    third = (30'(drive) * 30'sd85) >>> 8;
    unique case (cfg[4:3])
      2'd0: scaled = drive;
      2'd1: scaled = drive >>> 1;
      2'd2: scaled = third[21:0];
      default: scaled = drive >>> 2;
    endcase
    v_nxt = v + scaled - (v >>> LEAK_SHIFT);
    if (v_nxt < 0) v_nxt = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v     <= '0;
      spike <= 1'b0;
    end else begin
      spike <= 1'b0;
      if (cfg[5]) begin
        v <= '0;
      end else if (tick) begin
        if (v_nxt >= 22'(VTH)) begin
          v     <= v_nxt - 22'(VTH);
          spike <= 1'b1;
        end else begin
          v <= v_nxt;
        end
      end
    end
  end
endmodule
