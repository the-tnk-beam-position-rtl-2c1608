// bpm_fpga: the FPGA of one BPM ADC module.
//
// Four 14-bit ADCs sample the four analog channels (one per pickup button
// after the switch array and the analog down-conversion) at about 40*F0.
// For each channel the FPGA band-passes the samples, detects them
// synchronously with a cosine and sine from one shared NCO set slightly off
// 10*F0, integrates each component over one turn (Uc, Us), forms
// Uc^2 + Us^2 per turn and accumulates that over a set number of turns into
// slow-acquisition (SA) data. Results and settings are reached over VME.
// The chain, the channel count, the ADC width and the shared NCO follow the
// system description; taking the turn from a sample counter, the register
// map and the VME protocol subset are this design's own choices.
//
// Interface: clk is the ADC sample clock, one sample per channel per clock
// on adc_i. The VME port is a single-strobe A24/D32 slave (see
// bpm_vme_slave). The analog switch array, gain settings, PLLs and DDS are
// outside this FPGA design.
// Timing: a turn's value reaches the turn-by-turn registers 5 clocks after
// the turn's last sample; an SA value one clock after that.
module bpm_fpga
  import bpm_pkg::*;
#(
  parameter logic [23:0] BASE_ADDR = 24'h10_0000
)(
  input  logic        clk,
  input  logic        rst_n,
  input  adc_t        adc_i [NUM_CH],
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [23:2] vme_addr,
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n
);

  phase_t nco_freq;
  spt_t   spt;
  turns_t sa_turns;
  lut_t   nco_cos, nco_sin;
  logic   turn_end;
  sumsq_t tbt       [NUM_CH];
  logic   tbt_valid [NUM_CH];
  sa_t    sa        [NUM_CH];
  logic   sa_valid  [NUM_CH];

  bpm_nco u_nco (
    .clk    (clk),
    .rst_n  (rst_n),
    .freq_i (nco_freq),
    .cos_o  (nco_cos),
    .sin_o  (nco_sin)
  );

  bpm_turn_timer u_turn_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .spt_i      (spt),
    .turn_end_o (turn_end)
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    bpm_dsp_channel u_ch (
      .clk         (clk),
      .rst_n       (rst_n),
      .adc_i       (adc_i[c]),
      .turn_end_i  (turn_end),
      .cos_i       (nco_cos),
      .sin_i       (nco_sin),
      .sa_turns_i  (sa_turns),
      .tbt_o       (tbt[c]),
      .tbt_valid_o (tbt_valid[c]),
      .sa_o        (sa[c]),
      .sa_valid_o  (sa_valid[c])
    );
  end

  bpm_vme_slave #(.BASE_ADDR(BASE_ADDR)) u_vme (
    .clk         (clk),
    .rst_n       (rst_n),
    .vme_as_n    (vme_as_n),
    .vme_ds_n    (vme_ds_n),
    .vme_write_n (vme_write_n),
    .vme_addr    (vme_addr),
    .vme_data_i  (vme_data_i),
    .vme_data_o  (vme_data_o),
    .vme_data_oe (vme_data_oe),
    .vme_dtack_n (vme_dtack_n),
    .nco_freq_o  (nco_freq),
    .spt_o       (spt),
    .sa_turns_o  (sa_turns),
    .tbt_valid_i (tbt_valid[0]),
    .tbt_i       (tbt),
    .sa_valid_i  (sa_valid[0]),
    .sa_i        (sa)
  );

  // All channels share the turn marker and settings, so they stay in step.
  for (genvar c = 1; c < NUM_CH; c++) begin : g_step
    a_tbt_step: assert property (@(posedge clk) disable iff (!rst_n) tbt_valid[c] == tbt_valid[0]);
    a_sa_step:  assert property (@(posedge clk) disable iff (!rst_n) sa_valid[c] == sa_valid[0]);
  end

endmodule
