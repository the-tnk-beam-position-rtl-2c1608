// tb_bpm_fpga_phase: phase-dependence workload for the whole FPGA.
//
// Reproduces, for the digital part alone, two properties the system is
// specified for: the measured position must not depend on the signal phase
// (bound 5 um for single-bunch mode, with a geometric factor K = 20 mm),
// and slow phase noise (below 100 kHz) must not worsen SA data.
// Four channels carry one IF signal, one 3 dB lower to imitate a displaced
// beam, with fixed per-cable phase differences. The test sweeps the common
// signal phase over 8 values, then adds a 0.5 rad phase modulation at
// 10 kHz. For each case it reads one SA value per channel (100 turns per SA,
// the first period after each change skipped). It forms the amplitudes as
// square roots and the position X = K * (a0 + a3 - a1 - a2) / (a0 + a1 + a2 + a3).
// That formula and the button order are the testbench's own choice. It checks
// that all positions lie within 5 um of each other and near the value the
// ideal amplitudes give.
module tb_bpm_fpga_phase;
  import bpm_pkg::*;

  localparam real PI    = 3.14159265358979323846;
  localparam real F0    = 2.59e6;
  localparam real K_MM  = 20.0;
  localparam real AMP   = 5000.0;
  localparam int  TURNS = 100;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  adc_t        adc [NUM_CH];
  logic        as_n, ds_n, write_n;
  logic [23:2] addr;
  logic [31:0] wdata, rdata;
  logic        oe, dtack_n;
  int          checks = 0, failures = 0;
  real         gain [NUM_CH] = '{1.0, 0.70794578, 1.0, 1.0};
  real         cable [NUM_CH] = '{0.0, 0.21, -0.13, 0.07};
  real         common_phase = 0.0;
  real         pm_amp = 0.0;
  logic [31:0] freq;
  logic [31:0] ph = '0;
  longint      n = 0;

  bpm_fpga dut (
    .clk(clk), .rst_n(rst_n), .adc_i(adc),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_addr(addr),
    .vme_data_i(wdata), .vme_data_o(rdata), .vme_data_oe(oe), .vme_dtack_n(dtack_n));

  tb_vme_master master (
    .clk(clk), .as_n(as_n), .ds_n(ds_n), .write_n(write_n), .addr(addr),
    .wdata(wdata), .rdata(rdata), .dtack_n(dtack_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model with optional slow phase modulation (10 kHz).
  always @(negedge clk) begin
    real pm;
    pm = pm_amp * $sin(2.0 * PI * 10.0e3 / (40.0 * F0 + 5.0e3) * real'(n));
    for (int c = 0; c < NUM_CH; c++)
      adc[c] <= adc_t'($rtoi($floor(AMP * gain[c] *
                $cos(2.0 * PI * real'(ph) / (2.0 ** 32) + common_phase + cable[c] + pm) + 0.5)));
    ph <= ph + freq;
    n  <= n + 1;
  end

  function automatic real position(input real a [NUM_CH]);
    return K_MM * 1000.0 * (a[0] + a[3] - a[1] - a[2]) / (a[0] + a[1] + a[2] + a[3]);
  endfunction

  // Wait for two new SA values and return the amplitudes of the second.
  task automatic measure(output real amp_out [NUM_CH]);
    logic [31:0] q, start, w0, w1, w2;
    master.rd(5'd4, start);
    do master.rd(5'd4, q); while (q < start + 32'd2);
    for (int c = 0; c < NUM_CH; c++) begin
      master.rd(5'(8 + 4 * c), w0);
      master.rd(5'(8 + 4 * c + 1), w1);
      master.rd(5'(8 + 4 * c + 2), w2);
      amp_out[c] = $sqrt((real'(w2) * (2.0 ** 64) + real'(w1) * (2.0 ** 32) + real'(w0)) / TURNS) / 40.0;
    end
  endtask

  initial begin
    real a [NUM_CH];
    real x, xmin, xmax, x_ideal;
    real ideal [NUM_CH];
    freq = 32'($rtoi((10.0 * F0 - 3.0e3) / (40.0 * F0 + 5.0e3) * (2.0 ** 32)));
    for (int c = 0; c < NUM_CH; c++) ideal[c] = AMP * gain[c];
    x_ideal = position(ideal);
    xmin = 1.0e9; xmax = -1.0e9;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    master.wr(5'd1, freq);
    master.wr(5'd3, 32'(TURNS));

    for (int k = 0; k < 8; k++) begin
      common_phase = 2.0 * PI * k / 8.0 + 0.1;
      measure(a);
      x = position(a);
      $display("phase %4.2f rad: X = %9.3f um (amplitudes %7.1f %7.1f %7.1f %7.1f)",
               common_phase, x, a[0], a[1], a[2], a[3]);
      if (x < xmin) xmin = x;
      if (x > xmax) xmax = x;
      checks++;
      if (x > x_ideal + 5.0 || x < x_ideal - 5.0) begin
        failures++; $display("FAIL X %f far from ideal %f", x, x_ideal);
      end
    end
    checks++;
    if (xmax - xmin > 5.0) begin failures++; $display("FAIL phase dependence %f um", xmax - xmin); end
    $display("phase dependence: %0.3f um peak to peak (ideal X = %0.3f um)", xmax - xmin, x_ideal);

    // Slow phase noise: 0.5 rad at 10 kHz.
    pm_amp = 0.5;
    for (int k = 0; k < 4; k++) begin
      measure(a);
      x = position(a);
      $display("with phase modulation: X = %9.3f um", x);
      checks++;
      if (x > xmax + 5.0 || x < xmin - 5.0) begin
        failures++; $display("FAIL phase noise moves X to %f", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
