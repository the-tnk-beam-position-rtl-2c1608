// bpm_nco: numerically controlled oscillator for the synchronous detector.
//
// The NCO runs slightly off 10*F0 so that, with the heterodyne and sampling
// offsets, the detected signal is a DC value. A PHASE_W-bit accumulator adds
// the frequency word freq_i every clock (one ADC sample); its top LUT_AW bits
// address a cosine table of 2**LUT_AW words. The sine output reads the same
// table a quarter period earlier: sin(p) = cos(p - pi/2). The table is
// computed at elaboration from $cos, scaled to +/-(2**(LUT_W-1) - 1).
// The NCO and its frequency set from the offsets are the system's; the
// accumulator/table structure and its sizes are this design's choice.
//
// Timing: phase starts at 0 after reset; cos_o/sin_o are registered and
// belong to the phase held in the accumulator one clock earlier.
module bpm_nco
  import bpm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t freq_i,
  output lut_t   cos_o,
  output lut_t   sin_o
);

  localparam int unsigned DEPTH = 2 ** LUT_AW;
  typedef lut_t table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real    amp;
    amp = (2.0 ** (LUT_W - 1)) - 1.0;
    for (int i = 0; i < DEPTH; i++)
      t[i] = lut_t'($rtoi($floor(amp * $cos(2.0 * 3.14159265358979323846 * i / DEPTH) + 0.5)));
    return t;
  endfunction

  localparam table_t COS_TABLE = make_table();

  phase_t               phase_q;
  logic [LUT_AW-1:0]    cos_addr, sin_addr;

  assign cos_addr = phase_q[PHASE_W-1 -: LUT_AW];
  assign sin_addr = cos_addr - LUT_AW'(DEPTH / 4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= '0;
      cos_o   <= '0;
      sin_o   <= '0;
    end else begin
      phase_q <= phase_q + freq_i;
      cos_o   <= COS_TABLE[cos_addr];
      sin_o   <= COS_TABLE[sin_addr];
    end
  end

endmodule
