// bpm_turn_lpf: low-pass filter after the detector, one output per turn.
//
// Integrate-and-dump: the detector output is summed over one turn and the
// sum is output when the turn ends, after which the sum restarts from the
// next sample. Summing whole turns gives zeros at every revolution harmonic
// and removes the 2*f component the detector makes. One instance filters one
// component (Uc or Us). The LPF and the per-turn rate are the system's; the
// integrate-and-dump form is this design's choice.
//
// Timing: turn_end_i marks the last sample of a turn, presented with x_i.
// On the next clock y_o holds the turn's sum and valid_o is high for one
// clock. Reset clears the sum and the outputs.
module bpm_turn_lpf
  import bpm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  mix_t x_i,
  input  logic turn_end_i,
  output lpf_t y_o,
  output logic valid_o
);

  lpf_t acc_q, acc_next;

  assign acc_next = acc_q + LPF_W'(x_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      y_o     <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= turn_end_i;
      if (turn_end_i) begin
        y_o   <= acc_next;
        acc_q <= '0;
      end else begin
        acc_q <= acc_next;
      end
    end
  end

endmodule
