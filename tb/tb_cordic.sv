// Testbench for cordic: random vectors in all four quadrants (and on the
// axes); amplitude and phase compared with sqrt and atan2 computed in the
// testbench; latency ITER+2 cycles.
`include "tb_util.svh"
module tb_cordic;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic signed [31:0] x_in, y_in;
  logic busy, valid;
  logic [32:0] amp;
  logic signed [15:0] phase;
  int cyc = 0;
  localparam real PI = 3.14159265358979;

  cordic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `FINISH
  end

  task automatic one(longint xv, longint yv);
    real ea, ep, dp;
    int s;
    x_in = 32'(xv); y_in = 32'(yv);
    ea = $sqrt(real'(xv) * real'(xv) + real'(yv) * real'(yv));
    ep = $atan2(real'(yv), real'(xv)) / (2.0 * PI) * 65536.0;
    @(posedge clk); #1 start = 1; s = cyc;
    @(posedge clk); #1 start = 0;
    while (!valid) begin @(posedge clk); #1; end
    `CHECK(cyc - s == 18, $sformatf("latency %0d", cyc - s))
    dp = real'(phase) - ep;
    if (dp > 32768.0) dp -= 65536.0;
    if (dp < -32768.0) dp += 65536.0;
    `CHECK(dp < 3.0 && dp > -3.0, $sformatf("phase %0d exp %f (x=%0d y=%0d)", phase, ep, xv, yv))
    `CHECK(real'(amp) < ea * 1.0005 + 4.0 && real'(amp) > ea * 0.9995 - 4.0,
           $sformatf("amp %0d exp %f", amp, ea))
  endtask

  initial begin
    x_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    one(1000000, 0);
    one(0, 1000000);
    one(-1000000, 0);
    one(0, -1000000);
    one(-1000000, -1);
    one(2147483647, 2147483647);
    one(-64'sd2147483648, -64'sd2147483648);
    one(-64'sd2147483648, 64'sd2147483647);
    for (int i = 0; i < 200; i++) begin
      int sh = $urandom_range(10, 31);
      one(longint'(signed'(int'($urandom))) >>> (32 - sh),
          longint'(signed'(int'($urandom))) >>> (32 - sh));
    end
    `FINISH
  end
endmodule
