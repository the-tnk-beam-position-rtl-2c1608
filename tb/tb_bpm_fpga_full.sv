// tb_bpm_fpga_full: one complete slow-acquisition period at full size.
//
// The top runs with all parameters and register settings at their defaults
// (40 samples per turn, 259000 turns per SA value = 10 Hz at F0 = 2.59 MHz),
// except the NCO word, which is set over VME for dF1 = 3 kHz and
// dF2 = 5 kHz as in operation. Four channels carry the same IF signal with
// different phases, one 3 dB lower. The test checks that the first SA value
// appears after 259000 turns of 40 samples (10.36 million clocks, within
// 1000 clocks), that each channel's SA value is within 1 % of
// 259000 * (40 * A)^2 * gain^2, and that no second value came early.
module tb_bpm_fpga_full;
  import bpm_pkg::*;

  localparam real PI  = 3.14159265358979323846;
  localparam real F0  = 2.59e6;
  localparam real AMP = 4000.0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  adc_t        adc [NUM_CH];
  logic        as_n, ds_n, write_n;
  logic [23:2] addr;
  logic [31:0] wdata, rdata;
  logic        oe, dtack_n;
  int          checks = 0, failures = 0;
  real         gain [NUM_CH] = '{1.0, 1.0, 0.70794578, 1.0};
  real         phase_ofs [NUM_CH] = '{2.1, 0.4, 5.5, 3.3};
  logic [31:0] freq;
  logic [31:0] ph = '0;
  longint      cyc = 0;

  bpm_fpga dut (
    .clk(clk), .rst_n(rst_n), .adc_i(adc),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_addr(addr),
    .vme_data_i(wdata), .vme_data_o(rdata), .vme_data_oe(oe), .vme_dtack_n(dtack_n));

  tb_vme_master master (
    .clk(clk), .as_n(as_n), .ds_n(ds_n), .write_n(write_n), .addr(addr),
    .wdata(wdata), .rdata(rdata), .dtack_n(dtack_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (11_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(negedge clk) begin
    for (int c = 0; c < NUM_CH; c++)
      adc[c] <= adc_t'($rtoi($floor(AMP * gain[c] *
                $cos(2.0 * PI * real'(ph) / (2.0 ** 32) + phase_ofs[c]) + 0.5)));
    ph <= ph + freq;
  end

  initial begin
    logic [31:0] q, w0, w1, w2;
    longint      t_seen;
    real         want, v;
    freq = 32'($rtoi((10.0 * F0 - 3.0e3) / (40.0 * F0 + 5.0e3) * (2.0 ** 32)));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    master.wr(5'd1, freq);
    master.rd(5'd3, q);
    checks++; if (q != 32'd259000) begin failures++; $display("FAIL default turns %0d", q); end
    master.rd(5'd2, q);
    checks++; if (q != 32'd40) begin failures++; $display("FAIL default SPT %0d", q); end
    // Wait until shortly before the expected time, then poll the SA count.
    while (cyc < 64'd10_355_000) @(negedge clk);
    master.rd(5'd4, q);
    checks++; if (q != 0) begin failures++; $display("FAIL SA value before %0d clocks", cyc); end
    do master.rd(5'd4, q); while (q == 0 && cyc < 64'd10_400_000);
    t_seen = cyc;
    checks++;
    if (t_seen < 64'd10_360_000 || t_seen > 64'd10_361_000) begin
      failures++; $display("FAIL first SA seen at clock %0d, expected ~10360005", t_seen);
    end
    for (int c = 0; c < NUM_CH; c++) begin
      master.rd(5'(8 + 4 * c), w0);
      master.rd(5'(8 + 4 * c + 1), w1);
      master.rd(5'(8 + 4 * c + 2), w2);
      v = real'(w2) * (2.0 ** 64) + real'(w1) * (2.0 ** 32) + real'(w0);
      want = 259000.0 * (40.0 * AMP * gain[c]) ** 2;
      checks++;
      if (v < 0.99 * want || v > 1.01 * want) begin
        failures++; $display("FAIL SA ch%0d %e expected %e", c, v, want);
      end
      $display("SA ch%0d = %e (ideal %e)", c, v, want);
    end
    master.rd(5'd4, q);
    checks++; if (q != 32'd1) begin failures++; $display("FAIL SA count %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
