// tb_bpm_sumsq: self-checking test of Uc^2 + Us^2.
//
// Drives random signed one-turn values and the extremes of their range and
// compares each result, valid one clock later, with the sum of squares
// worked out here in 64-bit integers; also checks that the output holds
// while valid_i is low.
module tb_bpm_sumsq;
  import bpm_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   vin;
  lpf_t   uc, us;
  sumsq_t q;
  logic   vout;
  int     checks = 0, failures = 0;

  bpm_sumsq dut (.clk(clk), .rst_n(rst_n), .valid_i(vin), .uc_i(uc), .us_i(us), .sumsq_o(q), .valid_o(vout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input longint a, input longint b);
    longint unsigned exp_v = longint'(a * a + b * b);
    sumsq_t held;
    uc = lpf_t'(a); us = lpf_t'(b); vin = 1'b1;
    @(posedge clk); #1;
    checks += 2;
    if (64'(q) != exp_v) begin failures++; $display("FAIL %0d,%0d got %0d expected %0d", a, b, q, exp_v); end
    if (!vout) begin failures++; $display("FAIL valid missing"); end
    held = q;
    vin = 1'b0; uc = ~uc; us = ~us;
    @(posedge clk); #1;
    checks += 2;
    if (q != held) begin failures++; $display("FAIL output changed without valid"); end
    if (vout) begin failures++; $display("FAIL valid stuck"); end
  endtask

  initial begin
    static longint lim = longint'(1) << (LPF_W - 1);
    vin = 1'b0; uc = '0; us = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    drive(-lim, -lim);
    drive(lim - 1, -lim);
    drive(0, 0);
    drive(-1, 1);
    for (int i = 0; i < 2000; i++)
      drive(longint'($signed($urandom_range(0, 32'h7FFFFF))) - lim,
            longint'($signed($urandom_range(0, 32'h7FFFFF))) - lim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
