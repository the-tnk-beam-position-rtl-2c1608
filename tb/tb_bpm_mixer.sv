// tb_bpm_mixer: self-checking test of the synchronous detector.
//
// Drives random band-passed samples and random cosine/sine words (with the
// extremes) and compares each registered output, one clock later, with
// floor(x * c / 2**15) worked out here in 64-bit integers.
module tb_bpm_mixer;
  import bpm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bpf_t x;
  lut_t c, s;
  mix_t mc, ms;
  int   checks = 0, failures = 0;

  bpm_mixer dut (.clk(clk), .rst_n(rst_n), .x_i(x), .cos_i(c), .sin_i(s), .mix_c_o(mc), .mix_s_o(ms));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint scaled(input longint a, input longint b);
    longint p = a * b;
    // floor division by 2**15
    return (p >= 0) ? p / 32768 : -((-p + 32767) / 32768);
  endfunction

  task automatic drive(input int xv, input int cv, input int sv);
    x = bpf_t'(xv); c = lut_t'(cv); s = lut_t'(sv);
    @(posedge clk); #1;
    checks += 2;
    if (longint'(mc) != scaled(xv, cv)) begin failures++; $display("FAIL c: %0d*%0d got %0d", xv, cv, mc); end
    if (longint'(ms) != scaled(xv, sv)) begin failures++; $display("FAIL s: %0d*%0d got %0d", xv, sv, ms); end
  endtask

  initial begin
    x = '0; c = '0; s = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    drive(16383, 32767, -32767);
    drive(-16383, 32767, -32767);
    drive(-16383, -32767, 32767);
    drive(1, -1, 1);
    for (int i = 0; i < 3000; i++)
      drive($signed($urandom_range(0, 32766)) - 16383,
            $signed($urandom_range(0, 65534)) - 32767,
            $signed($urandom_range(0, 65534)) - 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
