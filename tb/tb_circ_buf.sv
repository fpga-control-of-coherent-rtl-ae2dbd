// Testbench for circ_buf: more records than the depth are written; the
// pointer, the record count and the wrap flag are checked, and the last
// DEPTH records are read back in order.
`include "tb_util.svh"
module tb_circ_buf;
  int checks = 0, failures = 0;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1, we = 0, rclk;
  logic [63:0] din, rdata;
  logic [3:0] wptr, raddr;
  logic [31:0] total;
  logic wrapped;

  circ_buf #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  assign rclk = clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `FINISH
  end

  function automatic logic [63:0] rec(int i);
    return {32'(i * 977), 32'(i)};
  endfunction

  initial begin
    int n;
    raddr = 0; din = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 5; i++) begin
      @(posedge clk); #1 we = 1; din = rec(i);
    end
    @(posedge clk); #1 we = 0;
    `CHECK(total == 5 && wptr == 5 && !wrapped, "five records")
    for (int i = 5; i < 41; i++) begin
      @(posedge clk); #1 we = 1; din = rec(i);
    end
    @(posedge clk); #1 we = 0;
    n = 41;
    `CHECK(total == 32'(n), $sformatf("total %0d", total))
    `CHECK(wptr == 4'(n % DEPTH), "wptr")
    `CHECK(wrapped, "wrapped")
    // newest first: record n-1-j sits at (wptr - 1 - j) mod DEPTH
    for (int j = 0; j < DEPTH; j++) begin
      raddr = 4'(n - 1 - j);
      @(posedge clk); #1;
      `CHECK(rdata == rec(n - 1 - j), $sformatf("record %0d", n - 1 - j))
    end
    `FINISH
  end
endmodule
