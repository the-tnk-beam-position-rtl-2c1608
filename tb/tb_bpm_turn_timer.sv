// tb_bpm_turn_timer: self-checking test of the turn marker.
//
// With 40 samples per turn the marker must come on the 40th sample after
// reset and then exactly every 40 samples. The length is then changed to
// other values (including 1, a marker every sample, and a value below the
// running count, which ends the turn at once) and the spacing is checked.
module tb_bpm_turn_timer;
  import bpm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  spt_t spt;
  logic turn_end;
  int   checks = 0, failures = 0;

  bpm_turn_timer dut (.clk(clk), .rst_n(rst_n), .spt_i(spt), .turn_end_o(turn_end));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count samples up to and including the next marker.
  task automatic expect_turn(input int len);
    int n = 0;
    do begin
      n++;
      #1;
      if (turn_end) begin @(posedge clk); break; end
      @(posedge clk);
    end while (n < 1000);
    checks++;
    if (n != len) begin failures++; $display("FAIL spt=%0d: turn of %0d samples, expected %0d", spt, n, len); end
  endtask

  initial begin
    spt = 8'd40;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 20; i++) expect_turn(40);
    @(negedge clk) spt = 8'd7;
    for (int i = 0; i < 10; i++) expect_turn(7);
    @(negedge clk) spt = 8'd1;
    for (int i = 0; i < 10; i++) expect_turn(1);
    @(negedge clk) spt = 8'd255;
    for (int i = 0; i < 3; i++) expect_turn(255);
    // shrink in the middle of a turn: ends on the next sample
    repeat (30) @(posedge clk);
    @(negedge clk) spt = 8'd10;
    expect_turn(1);
    for (int i = 0; i < 5; i++) expect_turn(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
