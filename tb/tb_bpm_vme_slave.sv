// tb_bpm_vme_slave: self-checking test of the VME register interface.
//
// Acts as a VME master doing single D32 cycles: address and data set up,
// AS* and DS* asserted, wait for DTACK*, release, wait for DTACK* to rise.
// Checks the reset values of the settings, write and read-back of each,
// that read-only registers ignore writes, that an address outside the board
// gets no DTACK*, that DTACK* comes within 5 clocks, and that turn-by-turn
// and SA values offered by the processing are latched for all channels and
// read back word by word, with the SA sequence count advancing per SA value.
module tb_bpm_vme_slave;
  import bpm_pkg::*;

  localparam logic [23:0] BASE = 24'h10_0000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        as_n, ds_n, write_n;
  logic [23:2] addr;
  logic [31:0] wdata, rdata;
  logic        oe, dtack_n;
  phase_t      nco_freq;
  spt_t        spt;
  turns_t      sa_turns;
  logic        tbt_valid, sa_valid;
  sumsq_t      tbt [NUM_CH];
  sa_t         sa  [NUM_CH];
  int          checks = 0, failures = 0;

  bpm_vme_slave #(.BASE_ADDR(BASE)) dut (
    .clk(clk), .rst_n(rst_n), .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_addr(addr), .vme_data_i(wdata), .vme_data_o(rdata), .vme_data_oe(oe), .vme_dtack_n(dtack_n),
    .nco_freq_o(nco_freq), .spt_o(spt), .sa_turns_o(sa_turns),
    .tbt_valid_i(tbt_valid), .tbt_i(tbt), .sa_valid_i(sa_valid), .sa_i(sa));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // One bus cycle; returns the data read and whether DTACK* came.
  task automatic cycle(input logic [23:0] a, input logic wr, input logic [31:0] d,
                       output logic [31:0] q, output logic acked);
    int n = 0;
    @(negedge clk);
    addr = a[23:2]; write_n = !wr; wdata = d;
    @(negedge clk);
    as_n = 1'b0; ds_n = 1'b0;
    while (dtack_n && n < 20) begin @(negedge clk); n++; end
    acked = !dtack_n;
    q = rdata;
    if (acked) begin
      checks++;
      if (n > 5) begin failures++; $display("FAIL DTACK after %0d clocks", n); end
      if (!wr) begin checks++; if (!oe) begin failures++; $display("FAIL data not driven"); end end
    end
    as_n = 1'b1; ds_n = 1'b1;
    n = 0;
    while (!dtack_n && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (!dtack_n || oe) begin failures++; $display("FAIL DTACK*/data not released"); end
    repeat (3) @(negedge clk);
  endtask

  task automatic wr(input logic [4:0] idx, input logic [31:0] d);
    logic [31:0] q; logic ack;
    cycle(BASE + 24'(idx) * 4, 1'b1, d, q, ack);
    checks++; if (!ack) begin failures++; $display("FAIL no DTACK on write %0d", idx); end
  endtask

  task automatic rd(input logic [4:0] idx, output logic [31:0] q);
    logic ack;
    cycle(BASE + 24'(idx) * 4, 1'b0, '0, q, ack);
    checks++; if (!ack) begin failures++; $display("FAIL no DTACK on read %0d", idx); end
  endtask

  initial begin
    logic [31:0] q;
    logic        ack;
    sumsq_t      tbt_ref [NUM_CH];
    sa_t         sa_ref  [NUM_CH];
    as_n = 1'b1; ds_n = 1'b1; write_n = 1'b1; addr = '0; wdata = '0;
    tbt_valid = 1'b0; sa_valid = 1'b0;
    for (int c = 0; c < NUM_CH; c++) begin tbt[c] = '0; sa[c] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    rd(5'd0, q); check("ID", q, 32'h4250_4D34);
    rd(5'd1, q); check("NCO reset", q, 32'h4000_0000);
    rd(5'd2, q); check("SPT reset", q, 32'd40);
    rd(5'd3, q); check("turns reset", q, 32'd259000);
    rd(5'd4, q); check("seq reset", q, 32'd0);

    wr(5'd1, 32'h3FFF_F9AB); rd(5'd1, q); check("NCO rw", q, 32'h3FFF_F9AB);
    check("NCO out", nco_freq, 32'h3FFF_F9AB);
    wr(5'd2, 32'hFFFF_FF21); rd(5'd2, q); check("SPT rw", q, 32'h21);
    check("SPT out", 32'(spt), 32'h21);
    wr(5'd3, 32'hFF12_3456); rd(5'd3, q); check("turns rw", q, 32'h12_3456);
    check("turns out", 32'(sa_turns), 32'h12_3456);
    wr(5'd0, 32'hDEAD_BEEF); rd(5'd0, q); check("ID read-only", q, 32'h4250_4D34);
    rd(5'd5, q); check("unmapped", q, 32'h0);

    // outside the board: no DTACK*, no effect
    cycle(24'h20_0004, 1'b1, 32'h1111_1111, q, ack);
    checks++; if (ack) begin failures++; $display("FAIL DTACK for another board"); end
    rd(5'd1, q); check("NCO kept", q, 32'h3FFF_F9AB);

    // turn-by-turn and SA values from the processing
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      for (int c = 0; c < NUM_CH; c++) begin
        tbt_ref[c] = {$urandom, $urandom};
        sa_ref[c]  = {$urandom, $urandom, $urandom};
        tbt[c] = tbt_ref[c]; sa[c] = sa_ref[c];
      end
      tbt_valid = 1'b1; sa_valid = 1'b1;
      @(negedge clk);
      tbt_valid = 1'b0; sa_valid = 1'b0;
      for (int c = 0; c < NUM_CH; c++) begin tbt[c] = '0; sa[c] = '0; end
      for (int c = 0; c < NUM_CH; c++) begin
        automatic logic [63:0] t64 = 64'(tbt_ref[c]);
        automatic logic [95:0] s96 = 96'(sa_ref[c]);
        for (int w = 0; w < 3; w++) begin
          rd(5'(8 + 4 * c + w), q); check($sformatf("SA ch%0d w%0d", c, w), q, s96[32 * w +: 32]);
        end
        rd(5'(8 + 4 * c + 3), q); check("SA gap", q, 32'h0);
        for (int w = 0; w < 2; w++) begin
          rd(5'(24 + 2 * c + w), q); check($sformatf("TBT ch%0d w%0d", c, w), q, t64[32 * w +: 32]);
        end
      end
      rd(5'd4, q); check("seq", q, 32'(rep + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
