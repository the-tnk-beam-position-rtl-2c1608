// tb_bpm_bpf: self-checking test of the two-tap band-pass filter.
//
// Drives random 14-bit samples, the two full-scale extremes and a
// quarter-rate sine, and compares every output with x[n] - x[n-2] computed
// here from the driven history (zero before reset release), one clock later.
// Also checks the gain of 2 at a quarter of the sample rate and the zero at DC.
module tb_bpm_bpf;
  import bpm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  adc_t adc;
  bpf_t bpf;
  int   checks = 0, failures = 0;
  int   hist [3];           // hist[0] = current sample, [1] previous, [2] two back

  bpm_bpf dut (.clk(clk), .rst_n(rst_n), .adc_i(adc), .bpf_o(bpf));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int v);
    int expected;
    adc = adc_t'(v);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = v;
    @(posedge clk);
    #1;
    expected = hist[0] - hist[2];
    checks++;
    if (int'(bpf) !== expected) begin
      failures++;
      $display("FAIL x=%0d x2=%0d got %0d expected %0d", hist[0], hist[2], bpf, expected);
    end
  endtask

  initial begin
    int peak;
    adc = '0;
    hist = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) drive($signed($urandom_range(0, 16383)) - 8192);
    // extremes: largest positive and negative differences
    drive(8191); drive(-8192); drive(-8192); drive(8191); drive(8191); drive(-8192);
    // DC input: output settles at zero
    for (int i = 0; i < 10; i++) drive(1234);
    checks++; if (bpf !== '0) begin failures++; $display("FAIL DC not rejected: %0d", bpf); end
    // quarter-rate sine 0, A, 0, -A: output amplitude 2A
    peak = 0;
    for (int i = 0; i < 40; i++) begin
      drive((i % 4 == 1) ? 3000 : (i % 4 == 3) ? -3000 : 0);
      if (i > 4 && ((int'(bpf) > peak) || (-int'(bpf) > peak))) peak = (bpf < 0) ? -int'(bpf) : int'(bpf);
    end
    checks++; if (peak != 6000) begin failures++; $display("FAIL fs/4 gain: peak %0d", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
