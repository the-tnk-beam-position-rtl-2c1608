// tb_bpm_nco: self-checking test of the NCO.
//
// At the nominal word 2**30 (a quarter of the sample rate) the cosine must
// run +FS, 0, -FS, 0 and the sine 0, +FS, 0, -FS, FS = 32767, with the first
// sample (phase 0) one clock after reset release. For random words the
// outputs are compared with the ideal cosine and sine of the phase, tracked
// here by an independent accumulator, truncated to the table's 10 bits:
// within 1 LSB of rounding.
module tb_bpm_nco;
  import bpm_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  phase_t freq;
  lut_t   cos_v, sin_v;
  int     checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  bpm_nco dut (.clk(clk), .rst_n(rst_n), .freq_i(freq), .cos_o(cos_v), .sin_o(sin_v));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal(input real ang);
    return $rtoi($floor(32767.0 * $cos(ang) + 0.5));
  endfunction

  task automatic check_val(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int exp_c [4] = '{32767, 0, -32767, 0};
    int exp_s [4] = '{0, 32767, 0, -32767};
    logic [31:0] ph;
    freq = 32'h4000_0000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      @(posedge clk); #1;
      check_val("quarter cos", cos_v, exp_c[i % 4], 0);
      check_val("quarter sin", sin_v, exp_s[i % 4], 0);
    end
    // random words from a fresh reset
    for (int trial = 0; trial < 8; trial++) begin
      freq = $urandom;
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      ph = '0;
      for (int i = 0; i < 500; i++) begin
        real ang;
        @(posedge clk); #1;
        ang = 2.0 * PI * real'(ph[31:22]) / 1024.0;
        check_val("cos", cos_v, ideal(ang), 1);
        check_val("sin", sin_v, ideal(ang - PI / 2.0), 1);
        ph = ph + freq;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
