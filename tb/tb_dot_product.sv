// Testbench for dot_product: random samples and calibrated vectors, sums
// compared with a reference computed in the testbench, and the NPULSE+2
// cycle latency.
`include "tb_util.svh"
module tb_dot_product;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [4:0] offset, raddr;
  coef_t [12:0] coef_a, coef_b;
  samp_t rdata;
  logic busy, valid;
  acc_t x, y;
  samp_t ram [24];
  int cyc = 0;

  dot_product dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) rdata <= ram[raddr];   // capture-RAM model

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `FINISH
  end

  initial begin
    longint ex, ey;
    int s;
    offset = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int trial = 0; trial < 40; trial++) begin
      for (int a = 0; a < 24; a++) ram[a] = samp_t'($urandom);
      for (int k = 0; k < 13; k++) begin
        coef_a[k] = coef_t'($urandom);
        coef_b[k] = coef_t'($urandom);
      end
      if (trial == 0) begin       // extremes
        for (int a = 0; a < 24; a++) ram[a] = -12'sd2048;
        for (int k = 0; k < 13; k++) begin coef_a[k] = -16'sd32768; coef_b[k] = 16'sd32767; end
      end
      offset = 5'($urandom_range(0, 11));
      ex = 0; ey = 0;
      for (int k = 0; k < 13; k++) begin
        ex += longint'(ram[offset + k]) * longint'(coef_a[k]);
        ey += longint'(ram[offset + k]) * longint'(coef_b[k]);
      end
      @(posedge clk); #1 start = 1; s = cyc;
      @(posedge clk); #1 start = 0;
      while (!valid) begin @(posedge clk); #1; end
      `CHECK(cyc - s == 15, $sformatf("latency %0d", cyc - s))
      `CHECK(longint'(x) == ex, $sformatf("x %0d exp %0d", x, ex))
      `CHECK(longint'(y) == ey, $sformatf("y %0d exp %0d", y, ey))
    end
    `FINISH
  end
endmodule
