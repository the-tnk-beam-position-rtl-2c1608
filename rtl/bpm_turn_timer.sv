// bpm_turn_timer: marks the last ADC sample of every turn.
//
// The ADCs sample at about 40*F0, so a turn is about 40 samples. A counter
// runs from 0 to spt_i - 1 and pulses turn_end_o on the last count, then
// wraps. The per-turn processing is the system's; taking the turn from a
// sample counter (rather than from an external revolution marker) is this
// design's choice. If spt_i is lowered below the running count, the counter
// ends the turn at once. spt_i of 0 or 1 gives a pulse every sample.
//
// Timing: counter at 0 after reset; turn_end_o is combinational from the
// count and marks the sample presented on the same clock.
module bpm_turn_timer
  import bpm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  spt_t spt_i,
  output logic turn_end_o
);

  spt_t count_q;

  assign turn_end_o = (count_q >= spt_i - SPT_W'(1)) || (spt_i == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count_q <= '0;
    else if (turn_end_o) count_q <= '0;
    else                 count_q <= count_q + SPT_W'(1);
  end

endmodule
