// bpm_bpf: digital band-pass filter at the head of each channel's chain.
//
// The chain's input is the ADC stream of a signal near a quarter of the
// sample rate (10*F0 sampled at about 40*F0). The filter is the two-tap
// difference y[n] = x[n] - x[n-2]: its response has zeros at DC and at half
// the sample rate and a gain of 2 at a quarter of the sample rate, so it
// removes ADC offset and the component at fs/2 while passing the signal.
// That there is a band-pass filter before the detector is the system's; the
// choice of this shortest filter is this design's own.
//
// Interface: one sample per clock on adc_i (two's complement); bpf_o is
// registered, one clock after the sample it belongs to. The two delay
// registers clear on reset, so the first two outputs see zero history.
module bpm_bpf
  import bpm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  adc_t adc_i,
  output bpf_t bpf_o
);

  adc_t x1_q, x2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1_q  <= '0;
      x2_q  <= '0;
      bpf_o <= '0;
    end else begin
      x1_q  <= adc_i;
      x2_q  <= x1_q;
      bpf_o <= BPF_W'(adc_i) - BPF_W'(x2_q);
    end
  end

endmodule
