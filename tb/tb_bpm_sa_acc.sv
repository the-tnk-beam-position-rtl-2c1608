// tb_bpm_sa_acc: self-checking test of the slow-acquisition accumulator.
//
// Feeds random turn values with gaps between them and checks that every
// turns_i-th value produces, one clock later, a single-clock sa_valid_o with
// the sum of exactly those values (worked out here). Runs with several
// period lengths, including 1, and checks a full-scale sum that needs the
// whole output width. The long default period is exercised end to end by the
// full-size test of the top.
module tb_bpm_sa_acc;
  import bpm_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   vin;
  sumsq_t val;
  turns_t turns;
  sa_t    sa;
  logic   sa_valid;
  int     checks = 0, failures = 0;
  int     sa_seen = 0;

  bpm_sa_acc dut (.clk(clk), .rst_n(rst_n), .valid_i(vin), .value_i(val), .turns_i(turns),
                  .sa_o(sa), .sa_valid_o(sa_valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (sa_valid) sa_seen++;

  task automatic period(input int n, input logic full);
    logic [SA_W-1:0] sum = '0;
    for (int i = 0; i < n; i++) begin
      sumsq_t v = full ? '1 : {$urandom, $urandom};
      val = v; vin = 1'b1;
      sum += SA_W'(v);
      @(posedge clk); #1;
      vin = 1'b0; val = {$urandom, $urandom};
      checks++;
      if (sa_valid !== (i == n - 1)) begin failures++; $display("FAIL sa_valid=%0b at %0d of %0d", sa_valid, i, n); end
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    checks++;
    if (sa !== sum) begin failures++; $display("FAIL period %0d: got %0h expected %0h", n, sa, sum); end
  endtask

  initial begin
    vin = 1'b0; val = '0; turns = turns_t'(10);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 5; p++) period(10, 1'b0);
    turns = turns_t'(1);
    for (int p = 0; p < 5; p++) period(1, 1'b0);
    turns = turns_t'(37);
    for (int p = 0; p < 3; p++) period(37, 1'b0);
    checks++;
    if (sa_seen != 13) begin failures++; $display("FAIL %0d SA values, expected 13", sa_seen); end
    turns = turns_t'(50000);
    period(50000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
