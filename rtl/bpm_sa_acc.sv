// bpm_sa_acc: slow-acquisition accumulator.
//
// Adds the turn-by-turn values over turns_i turns and outputs their sum as
// one slow-acquisition (SA) value; then it starts again from zero. At the
// default of 259000 turns (2.59 MHz / 10 Hz) this gives the 10 Hz SA rate
// used for slow orbit feedback. Accumulating a set number of turns is the
// system's; the restart behaviour and widths are this design's choice. The
// sum is kept at full precision (SUMSQ_W + TURNS_W bits), so it cannot
// overflow. If turns_i is lowered below the running count, the period ends
// on the next value; turns_i of 0 behaves as 1.
//
// Timing: valid_i with value_i in; on the clock after the value that
// completes a period, sa_o holds the sum and sa_valid_o is high for one clock.
module bpm_sa_acc
  import bpm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid_i,
  input  sumsq_t value_i,
  input  turns_t turns_i,
  output sa_t    sa_o,
  output logic   sa_valid_o
);

  sa_t    acc_q, acc_next;
  turns_t count_q;
  logic   last;

  assign acc_next = acc_q + SA_W'(value_i);
  assign last     = (count_q >= turns_i - TURNS_W'(1)) || (turns_i == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= '0;
      count_q    <= '0;
      sa_o       <= '0;
      sa_valid_o <= 1'b0;
    end else begin
      sa_valid_o <= valid_i && last;
      if (valid_i) begin
        if (last) begin
          sa_o    <= acc_next;
          acc_q   <= '0;
          count_q <= '0;
        end else begin
          acc_q   <= acc_next;
          count_q <= count_q + TURNS_W'(1);
        end
      end
    end
  end

endmodule
