// bpm_pkg: constants and types shared by the BPM signal-processing FPGA.
//
// The storage ring turns at F0 = 2.59 MHz. Each of the four ADCs samples its
// intermediate-frequency signal (10*F0 minus a few kHz) at 40*F0 plus a few
// kHz, so one turn is about 40 samples and the signal sits near a quarter of
// the sample rate. The ADC width (14 bits), the channel count (4), the 40
// samples per turn and the 10 Hz slow-acquisition rate follow the system
// description; every internal width below is this design's own choice, made
// so that no stage can overflow at the largest settings the registers allow.
package bpm_pkg;

  // Four 14-bit ADCs per module, one per analog channel.
  localparam int unsigned NUM_CH = 4;
  localparam int unsigned ADC_W  = 14;

  // Digital band-pass output: difference of two ADC samples, one bit wider.
  localparam int unsigned BPF_W = ADC_W + 1;

  // NCO: 32-bit phase accumulator, 1024-entry cosine table of 16-bit words.
  localparam int unsigned PHASE_W   = 32;
  localparam int unsigned LUT_AW    = 10;
  localparam int unsigned LUT_W     = 16;

  // Detector output: product scaled back by the table's full scale.
  localparam int unsigned MIX_W = BPF_W;

  // Samples per turn: register of SPT_W bits; nominal 40 (sampling at 40*F0).
  localparam int unsigned SPT_W           = 8;
  localparam int unsigned SPT_DEFAULT     = 40;

  // One-turn integrals Uc, Us: room for 2**SPT_W - 1 samples.
  localparam int unsigned LPF_W = MIX_W + SPT_W;

  // Uc^2 + Us^2 for one turn (turn-by-turn value).
  localparam int unsigned SUMSQ_W = 2 * LPF_W;

  // Slow acquisition: number of turns per SA value. 2.59 MHz / 10 Hz = 259000.
  localparam int unsigned TURNS_W        = 22;
  localparam int unsigned SA_TURNS_DEFAULT = 259_000;
  localparam int unsigned SA_W           = SUMSQ_W + TURNS_W;

  // Nominal NCO frequency word: 10*F0 / (40*F0) of the sample rate = 2**30.
  // The operating value is set over VME from the chosen frequency offsets.
  localparam logic [PHASE_W-1:0] NCO_FREQ_DEFAULT = 32'h4000_0000;

  typedef logic signed [ADC_W-1:0]   adc_t;
  typedef logic signed [BPF_W-1:0]   bpf_t;
  typedef logic signed [LUT_W-1:0]   lut_t;
  typedef logic signed [MIX_W-1:0]   mix_t;
  typedef logic signed [LPF_W-1:0]   lpf_t;
  typedef logic        [SUMSQ_W-1:0] sumsq_t;
  typedef logic        [SA_W-1:0]    sa_t;
  typedef logic        [PHASE_W-1:0] phase_t;
  typedef logic        [SPT_W-1:0]   spt_t;
  typedef logic        [TURNS_W-1:0] turns_t;

  // Word index of each 32-bit VME register (byte address = index * 4).
  typedef enum logic [4:0] {
    REG_ID       = 5'd0,   // read-only identification word
    REG_NCO_FREQ = 5'd1,   // NCO frequency word
    REG_SPT      = 5'd2,   // samples per turn
    REG_SA_TURNS = 5'd3,   // turns per slow-acquisition value
    REG_SA_SEQ   = 5'd4,   // count of slow-acquisition values produced
    REG_SA_BASE  = 5'd8,   // SA data: channel c word w at 8 + 4*c + w, w = 0..2
    REG_TBT_BASE = 5'd24   // turn-by-turn data: channel c word w at 24 + 2*c + w
  } reg_idx_e;

  localparam logic [31:0] BPM_ID = 32'h4250_4D34;  // "BPM4"

endpackage
