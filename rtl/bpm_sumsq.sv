// bpm_sumsq: sum of squares of the per-turn cosine and sine components.
//
// Computes Uc^2 + Us^2 for each turn, which is the square of the signal's
// amplitude and does not depend on its phase. This is the system's
// turn-by-turn value. Full precision is kept: the output is twice the input
// width, which holds the largest sum, 2 * (2**(LPF_W-1))**2 = 2**(2*LPF_W-1).
//
// Timing: valid_i with uc_i/us_i in; one clock later sumsq_o holds the
// result and valid_o is high for one clock. Reset clears the outputs.
module bpm_sumsq
  import bpm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid_i,
  input  lpf_t   uc_i,
  input  lpf_t   us_i,
  output sumsq_t sumsq_o,
  output logic   valid_o
);

  logic signed [SUMSQ_W-1:0] sq_c, sq_s;

  always_comb begin
    sq_c = SUMSQ_W'(uc_i) * SUMSQ_W'(uc_i);
    sq_s = SUMSQ_W'(us_i) * SUMSQ_W'(us_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sumsq_o <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) sumsq_o <= sumsq_t'(sq_c) + sumsq_t'(sq_s);
    end
  end

endmodule
