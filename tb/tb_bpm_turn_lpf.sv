// tb_bpm_turn_lpf: self-checking test of the one-turn integrate-and-dump.
//
// Drives random detector samples with turn markers at random spacing
// (1 to 60 samples, and full-scale runs of 255 samples) and checks that each
// output, valid one clock after the marker, equals the sum of exactly that
// turn's samples as added up here, and that valid is high for one clock only.
module tb_bpm_turn_lpf;
  import bpm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  mix_t x;
  logic turn_end;
  lpf_t y;
  logic valid;
  int   checks = 0, failures = 0;

  bpm_turn_lpf dut (.clk(clk), .rst_n(rst_n), .x_i(x), .turn_end_i(turn_end), .y_o(y), .valid_o(valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_turn(input int len, input int fixed);
    longint sum = 0;
    for (int i = 0; i < len; i++) begin
      int v = (fixed != 0) ? fixed : $signed($urandom_range(0, 32766)) - 16383;
      x = mix_t'(v);
      turn_end = (i == len - 1);
      sum += v;
      @(posedge clk); #1;
      checks++;
      if (valid !== (i == len - 1)) begin failures++; $display("FAIL valid=%0b at sample %0d of %0d", valid, i, len); end
    end
    checks++;
    if (longint'(y) != sum) begin failures++; $display("FAIL turn of %0d: got %0d expected %0d", len, y, sum); end
  endtask

  initial begin
    x = '0; turn_end = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 300; t++) run_turn($urandom_range(1, 60), 0);
    run_turn(255, 16383);
    run_turn(255, -16384);
    run_turn(40, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
