// bpm_dsp_channel: the signal-processing chain of one ADC channel.
//
// ADC data -> band-pass filter -> synchronous detector (cosine and sine
// from the shared NCO) -> one-turn low-pass filters giving Uc and Us ->
// Uc^2 + Us^2 per turn (turn-by-turn value) -> accumulator over a set number
// of turns (slow-acquisition value). This order of stages is the system's;
// the filter forms and widths inside each stage are this design's choices,
// described in the stage modules.
//
// Interface: one ADC sample per clock. turn_end_i marks the last sample of
// a turn and comes with that sample on adc_i; cos_i/sin_i come from the
// shared NCO. The chain delays turn_end_i by the two clocks of the filter and
// mixer registers so that each turn sums exactly its own samples.
// Timing: tbt_valid_o rises 4 clocks after the sample that ends a turn,
// sa_valid_o one clock after the tbt_valid_o that completes a period.
module bpm_dsp_channel
  import bpm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  adc_t   adc_i,
  input  logic   turn_end_i,
  input  lut_t   cos_i,
  input  lut_t   sin_i,
  input  turns_t sa_turns_i,
  output sumsq_t tbt_o,
  output logic   tbt_valid_o,
  output sa_t    sa_o,
  output logic   sa_valid_o
);

  bpf_t       bpf;
  mix_t       mix_c, mix_s;
  lpf_t       uc, us;
  logic       uc_valid, us_valid;
  logic [1:0] turn_end_d;

  // Align the turn marker with the mixer output (filter + mixer registers).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) turn_end_d <= '0;
    else        turn_end_d <= {turn_end_d[0], turn_end_i};
  end

  bpm_bpf u_bpf (
    .clk   (clk),
    .rst_n (rst_n),
    .adc_i (adc_i),
    .bpf_o (bpf)
  );

  bpm_mixer u_mixer (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_i     (bpf),
    .cos_i   (cos_i),
    .sin_i   (sin_i),
    .mix_c_o (mix_c),
    .mix_s_o (mix_s)
  );

  bpm_turn_lpf u_lpf_c (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_i        (mix_c),
    .turn_end_i (turn_end_d[1]),
    .y_o        (uc),
    .valid_o    (uc_valid)
  );

  bpm_turn_lpf u_lpf_s (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_i        (mix_s),
    .turn_end_i (turn_end_d[1]),
    .y_o        (us),
    .valid_o    (us_valid)
  );

  bpm_sumsq u_sumsq (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (uc_valid & us_valid),
    .uc_i    (uc),
    .us_i    (us),
    .sumsq_o (tbt_o),
    .valid_o (tbt_valid_o)
  );

  bpm_sa_acc u_sa_acc (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid_i    (tbt_valid_o),
    .value_i    (tbt_o),
    .turns_i    (sa_turns_i),
    .sa_o       (sa_o),
    .sa_valid_o (sa_valid_o)
  );

  // Both one-turn filters see the same marker, so their outputs stay paired.
  a_lpf_paired: assert property (@(posedge clk) disable iff (!rst_n) uc_valid == us_valid);

endmodule
