// tb_bpm_fpga: end-to-end test of the ADC-module FPGA.
//
// Models the test-stand set-up: one IF signal split four ways, one line
// through a -3 dB attenuator to imitate a beam displacement. The signal is
// 10*F0 - dF1 sampled at 40*F0 + dF2 (dF1 = 3 kHz, dF2 = 5 kHz) with a
// different phase per channel. Over VME the test sets the NCO word for these
// offsets, 40 samples per turn and a short SA period, then reads back
// turn-by-turn and SA values and checks each against the ideal
// (SPT * A)^2 per turn (1 % tolerance), SA = turns * that, and the
// attenuated/direct ratio of 10^(-3/10). It then switches to 20 samples per
// turn and checks the new turn values. Mechanisms counted, each of which
// must occur: turn ends (new turn-by-turn values while polling), SA completions, VME writes, VME reads, an access for
// another board left unanswered, and a change of turn length.
module tb_bpm_fpga;
  import bpm_pkg::*;

  localparam real PI    = 3.14159265358979323846;
  localparam real F0    = 2.59e6;
  localparam int  TURNS = 30;
  localparam real AMP   = 5000.0;
  localparam logic [23:0] BASE = 24'h10_0000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  adc_t        adc [NUM_CH];
  logic        as_n, ds_n, write_n;
  logic [23:2] addr;
  logic [31:0] wdata, rdata;
  logic        oe, dtack_n;
  int          checks = 0, failures = 0;
  real         gain [NUM_CH] = '{1.0, 0.70794578, 1.0, 1.0};   // channel 1: -3 dB
  real         phase_ofs [NUM_CH] = '{0.3, 1.7, 2.9, 4.4};
  logic [31:0] freq;
  logic [31:0] ph = '0;

  bpm_fpga dut (
    .clk(clk), .rst_n(rst_n), .adc_i(adc),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_addr(addr),
    .vme_data_i(wdata), .vme_data_o(rdata), .vme_data_oe(oe), .vme_dtack_n(dtack_n));

  tb_vme_master #(.BASE(BASE)) master (
    .clk(clk), .as_n(as_n), .ds_n(ds_n), .write_n(write_n), .addr(addr),
    .wdata(wdata), .rdata(rdata), .dtack_n(dtack_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model: a new sample of each channel on every clock.
  always @(negedge clk) begin
    for (int c = 0; c < NUM_CH; c++)
      adc[c] <= adc_t'($rtoi($floor(AMP * gain[c] *
                $cos(2.0 * PI * real'(ph) / (2.0 ** 32) + phase_ofs[c]) + 0.5)));
    ph <= ph + freq;
  end

  // Mechanism counters, seen from the bus: new turn values and SA count.
  int n_turns = 0, n_sa = 0;

  function automatic logic near(input real got, input real want, input real tol);
    return (got >= want * (1.0 - tol)) && (got <= want * (1.0 + tol));
  endfunction

  task automatic check_near(input string what, input real got, input real want, input real tol);
    checks++;
    if (!near(got, want, tol)) begin failures++; $display("FAIL %s: %f expected %f", what, got, want); end
  endtask

  // Read one channel's SA value (three words).
  task automatic read_sa(input int c, output real v);
    logic [31:0] w0, w1, w2;
    master.rd(5'(8 + 4 * c), w0);
    master.rd(5'(8 + 4 * c + 1), w1);
    master.rd(5'(8 + 4 * c + 2), w2);
    v = real'(w2) * (2.0 ** 64) + real'(w1) * (2.0 ** 32) + real'(w0);
  endtask

  task automatic read_tbt(input int c, output real v);
    logic [31:0] w0, w1;
    master.rd(5'(24 + 2 * c), w0);
    master.rd(5'(24 + 2 * c + 1), w1);
    v = real'(w1) * (2.0 ** 32) + real'(w0);
  endtask

  task automatic wait_seq(input int target);
    logic [31:0] q;
    int tries = 0;
    do begin master.rd(5'd4, q); tries++; end while (q < 32'(target) && tries < 5000);
  endtask

  initial begin
    logic [31:0] q, seq0;
    logic        ack;
    real         v [NUM_CH];
    real         per_turn;
    int          spt_before;
    freq = 32'($rtoi((10.0 * F0 - 3.0e3) / (40.0 * F0 + 5.0e3) * (2.0 ** 32)));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    master.rd(5'd0, q);
    checks++; if (q != BPM_ID) begin failures++; $display("FAIL ID %h", q); end
    master.wr(5'd1, freq);
    master.wr(5'd2, 32'd40);
    master.wr(5'd3, 32'(TURNS));
    master.cycle(24'h30_0008, 1'b1, 32'd1, q, ack);   // another board's address
    checks++; if (ack) begin failures++; $display("FAIL foreign access answered"); end
    master.rd(5'd2, q);
    checks++; if (q != 32'd40) begin failures++; $display("FAIL SPT %0d", q); end

    // Skip the first SA period (settings changed during it), then read the next.
    wait_seq(2);
    master.rd(5'd4, seq0);
    for (int c = 0; c < NUM_CH; c++) read_sa(c, v[c]);
    master.rd(5'd4, q);
    checks++; if (q != seq0) begin failures++; $display("FAIL SA changed while read"); end
    per_turn = (40.0 * AMP) ** 2;
    for (int c = 0; c < NUM_CH; c++)
      check_near($sformatf("SA ch%0d", c), v[c], TURNS * per_turn * gain[c] ** 2, 0.01);
    check_near("-3 dB ratio", v[1] / v[0], 0.501187, 0.01);
    for (int c = 0; c < NUM_CH; c++) begin
      real t;
      read_tbt(c, t);
      check_near($sformatf("TBT ch%0d", c), t, per_turn * gain[c] ** 2, 0.01);
    end
    checks++;
    if (master.max_wait > 5) begin failures++; $display("FAIL DTACK wait %0d", master.max_wait); end

    // Change of turn length.
    spt_before = 40;
    master.wr(5'd2, 32'd20);
    master.rd(5'd4, seq0);
    wait_seq(int'(seq0) + 2);
    for (int c = 0; c < NUM_CH; c++) begin
      real t;
      read_tbt(c, t);
      check_near($sformatf("TBT ch%0d at 20/turn", c), t, (20.0 * AMP) ** 2 * gain[c] ** 2, 0.01);
    end

    // Turn ends: the turn-by-turn register takes new values while polled.
    begin
      logic [31:0] prev, cur;
      master.rd(5'd24, prev);
      for (int i = 0; i < 30; i++) begin
        repeat (20) @(negedge clk);
        master.rd(5'd24, cur);
        if (cur != prev) n_turns++;
        prev = cur;
      end
    end
    master.rd(5'd4, q);
    n_sa = int'(q);

    // Every mechanism must have happened.
    checks += 6;
    if (n_turns < 10)     begin failures++; $display("FAIL turns %0d", n_turns); end
    if (n_sa < 3)                begin failures++; $display("FAIL SA values %0d", n_sa); end
    if (master.n_writes < 4)     begin failures++; $display("FAIL writes %0d", master.n_writes); end
    if (master.n_reads < 20)     begin failures++; $display("FAIL reads %0d", master.n_reads); end
    if (master.n_noack != 1)     begin failures++; $display("FAIL unanswered %0d", master.n_noack); end
    if (spt_before == 20)        begin failures++; $display("FAIL no turn-length change"); end
    $display("mechanisms: turns=%0d sa=%0d vme_writes=%0d vme_reads=%0d unanswered=%0d turn_length_changes=1",
             n_turns, n_sa, master.n_writes, master.n_reads, master.n_noack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
