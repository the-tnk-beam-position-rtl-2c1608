// tb_vme_master: bus-functional VME master for the testbenches.
//
// Performs single D32 cycles: sets address, WRITE* and data, asserts AS*
// and DS*, waits up to 20 clocks for DTACK*, then releases the strobes and
// waits for DTACK* to rise. Counts cycles that were acknowledged and those
// that were not, and the longest wait for DTACK*. Tasks are called
// hierarchically by the testbench that instantiates it.
module tb_vme_master #(
  parameter logic [23:0] BASE = 24'h10_0000
)(
  input  logic        clk,
  output logic        as_n,
  output logic        ds_n,
  output logic        write_n,
  output logic [23:2] addr,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  input  logic        dtack_n
);

  int n_reads = 0, n_writes = 0, n_noack = 0, max_wait = 0;

  initial begin
    as_n = 1'b1; ds_n = 1'b1; write_n = 1'b1; addr = '0; wdata = '0;
  end

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
    if (acked && n > max_wait) max_wait = n;
    if (!acked) n_noack++;
    else if (wr) n_writes++;
    else n_reads++;
    as_n = 1'b1; ds_n = 1'b1;
    n = 0;
    while (!dtack_n && n < 20) begin @(negedge clk); n++; end
    repeat (2) @(negedge clk);
  endtask

  task automatic wr(input logic [4:0] idx, input logic [31:0] d);
    logic [31:0] q; logic ack;
    cycle(BASE + 24'(idx) * 4, 1'b1, d, q, ack);
  endtask

  task automatic rd(input logic [4:0] idx, output logic [31:0] q);
    logic ack;
    cycle(BASE + 24'(idx) * 4, 1'b0, '0, q, ack);
  endtask

endmodule
