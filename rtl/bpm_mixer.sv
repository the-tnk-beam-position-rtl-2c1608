// bpm_mixer: synchronous detector of one channel.
//
// Multiplies the band-passed ADC sample by the NCO's cosine and sine. Each
// product is scaled back by the table's full scale (arithmetic shift right
// by LUT_W-1 bits), which keeps the result within the input's width. The
// two multipliers are the system's; the scaling is this design's choice.
//
// Timing: inputs that arrive together leave as mix_c_o/mix_s_o one clock
// later (registered). Reset clears the outputs.
module bpm_mixer
  import bpm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  bpf_t x_i,
  input  lut_t cos_i,
  input  lut_t sin_i,
  output mix_t mix_c_o,
  output mix_t mix_s_o
);

  localparam int unsigned PROD_W = BPF_W + LUT_W;

  logic signed [PROD_W-1:0] prod_c, prod_s;

  always_comb begin
    prod_c = PROD_W'(x_i) * PROD_W'(cos_i);
    prod_s = PROD_W'(x_i) * PROD_W'(sin_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix_c_o <= '0;
      mix_s_o <= '0;
    end else begin
      mix_c_o <= MIX_W'(prod_c >>> (LUT_W - 1));
      mix_s_o <= MIX_W'(prod_s >>> (LUT_W - 1));
    end
  end

endmodule
