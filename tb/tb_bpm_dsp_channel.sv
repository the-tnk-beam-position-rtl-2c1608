// tb_bpm_dsp_channel: self-checking test of one channel's full chain.
//
// Plays the role of the ADC and of the NCO: it drives a quantised sine near
// a quarter of the sample rate (the IF 10*F0 - dF1 sampled at 40*F0 + dF2,
// with dF1 = 3 kHz and dF2 = 5 kHz) and the matching 10-bit-phase cosine and
// sine references, marking every 40th sample as the end of a turn.
// Expected values come from a model written here sample by sample:
// filter x[n] - x[n-2], products floored by 2**15, per-turn sums, sum of
// squares, and 5-turn SA sums. Every turn-by-turn and SA value must match
// it exactly and arrive on the right clock (4 clocks after the turn's last
// sample, SA one clock later). Each turn value must also be within 1 % of
// (40 * A)^2, the square of the amplitude the chain should measure, except
// the first, whose filter starts from an empty history.
module tb_bpm_dsp_channel;
  import bpm_pkg::*;

  localparam int  SPT   = 40;
  localparam int  TURNS = 5;
  localparam real PI    = 3.14159265358979323846;
  localparam real F0    = 2.59e6;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  adc_t   adc;
  logic   turn_end;
  lut_t   c_ref, s_ref;
  turns_t sa_turns;
  sumsq_t tbt;
  logic   tbt_valid;
  sa_t    sa;
  logic   sa_valid;
  int     checks = 0, failures = 0;

  bpm_dsp_channel dut (
    .clk(clk), .rst_n(rst_n), .adc_i(adc), .turn_end_i(turn_end), .cos_i(c_ref), .sin_i(s_ref),
    .sa_turns_i(sa_turns), .tbt_o(tbt), .tbt_valid_o(tbt_valid), .sa_o(sa), .sa_valid_o(sa_valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fl15(input longint p);
    return (p >= 0) ? p / 32768 : -((-p + 32767) / 32768);
  endfunction

  function automatic int table_cos(input logic [9:0] a);
    return $rtoi($floor(32767.0 * $cos(2.0 * PI * real'(a) / 1024.0) + 0.5));
  endfunction

  // Expected results, in order, with the clock on which each must appear.
  longint unsigned exp_tbt [$];
  int              exp_tbt_cyc [$];
  longint unsigned exp_sa [$];
  int              exp_sa_cyc [$];
  int              cyc = 0;
  int              tbt_seen = 0, sa_seen = 0;
  real             amp;

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    if (tbt_valid) begin
      longint unsigned e;
      int ec;
      real ideal;
      e = exp_tbt.pop_front();
      ec = exp_tbt_cyc.pop_front();
      ideal = (SPT * amp) ** 2;
      tbt_seen++;
      checks += 3;
      if (64'(tbt) != e) begin failures++; $display("FAIL tbt %0d expected %0d", tbt, e); end
      if (cyc != ec) begin failures++; $display("FAIL tbt at clock %0d expected %0d", cyc, ec); end
      if (tbt_seen > 1 && ((real'(tbt) - ideal > 0.01 * ideal) || (ideal - real'(tbt) > 0.01 * ideal))) begin failures++; $display("FAIL tbt %0d far from %0f", tbt, ideal); end
    end
    if (sa_valid) begin
      longint unsigned e;
      int ec;
      e = exp_sa.pop_front();
      ec = exp_sa_cyc.pop_front();
      sa_seen++;
      checks += 2;
      if (64'(sa) != e) begin failures++; $display("FAIL sa %0d expected %0d", sa, e); end
      if (cyc != ec) begin failures++; $display("FAIL sa at clock %0d expected %0d", cyc, ec); end
    end
  end

  initial begin
    logic [31:0] freq, ph_sig, ph_ref;
    real         phi0;
    int          x [$];
    longint      uc = 0, us = 0;
    longint unsigned sa_sum = 0;
    int          turns_done = 0;
    freq  = 32'($rtoi((10.0 * F0 - 3.0e3) / (40.0 * F0 + 5.0e3) * (2.0 ** 32)));
    amp   = 6000.0;
    phi0  = 1.234;
    ph_sig = '0; ph_ref = 32'h1234_5678;
    sa_turns = turns_t'(TURNS);
    adc = '0; turn_end = 1'b0; c_ref = '0; s_ref = '0;
    x = '{0, 0, 0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k <= 40 * 60; k++) begin
      automatic int xv = $rtoi($floor(amp * $cos(2.0 * PI * real'(ph_sig) / (2.0 ** 32) + phi0) + 0.5));
      automatic int cv = table_cos(ph_ref[31:22]);
      automatic int sv = table_cos(ph_ref[31:22] - 10'd256);
      // drive sample k and reference k at cycle k
      adc = adc_t'(xv); turn_end = (k % SPT == SPT - 1); c_ref = lut_t'(cv); s_ref = lut_t'(sv);
      x.push_back(xv);   // x[$] = x[k]; x[$-1] = x[k-1]; ...
      // this cycle the mixer sees y(k-1) = x[k-1] - x[k-3] against reference k
      if (k >= 1) begin
        automatic longint y = longint'(x[x.size() - 2]) - longint'(x[x.size() - 4]);
        uc += fl15(y * cv);
        us += fl15(y * sv);
        if ((k - 1) % SPT == SPT - 1) begin
          automatic longint unsigned q = longint'(uc * uc + us * us);
          exp_tbt.push_back(q);
          exp_tbt_cyc.push_back(k - 1 + 4);
          sa_sum += q;
          turns_done++;
          if (turns_done % TURNS == 0) begin
            exp_sa.push_back(sa_sum);
            exp_sa_cyc.push_back(k - 1 + 5);
            sa_sum = 0;
          end
          uc = 0; us = 0;
        end
      end
      if (x.size() > 8) void'(x.pop_front());
      ph_sig += freq; ph_ref += freq;
      @(negedge clk);
    end
    turn_end = 1'b0;
    repeat (10) @(negedge clk);
    checks += 2;
    if (tbt_seen < 55) begin failures++; $display("FAIL only %0d turn values", tbt_seen); end
    if (sa_seen < 11) begin failures++; $display("FAIL only %0d SA values", sa_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
