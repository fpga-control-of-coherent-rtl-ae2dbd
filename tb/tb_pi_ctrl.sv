// Testbench for pi_ctrl: a reference PI model in 64-bit arithmetic checks
// the error wrap-around, the proportional and integral terms, integrator
// and output clamping, the hold while disabled and the 2-cycle latency.
`include "tb_util.svh"
module tb_pi_ctrl;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, enable = 0, valid_in = 0;
  phase_t setpoint, phase, err;
  logic signed [15:0] kp, ki;
  logic [11:0] init_code, code;
  logic valid_out, sat;
  int cyc = 0;
  longint integ;

  pi_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `FINISH
  end

  task automatic step(int ph);
    longint e, u, ec;
    int s;
    bit es;
    phase = phase_t'(ph);
    e = longint'(phase_t'(setpoint - phase_t'(ph)));
    if (enable) begin
      integ = integ + longint'(ki) * e;
      if (integ < 0) integ = 0;
      if (integ > (longint'(4095) << 16)) integ = longint'(4095) << 16;
      u = (integ + longint'(kp) * e) >>> 16;
    end else begin
      integ = longint'(init_code) << 16;
      u = init_code;
    end
    es = (u < 0) || (u > 4095);
    ec = (u < 0) ? 0 : (u > 4095) ? 4095 : u;
    @(posedge clk); #1 valid_in = 1; s = cyc;
    @(posedge clk); #1 valid_in = 0;
    while (!valid_out) begin @(posedge clk); #1; end
    `CHECK(cyc - s == 2, $sformatf("latency %0d", cyc - s))
    `CHECK(longint'(err) == e, $sformatf("err %0d exp %0d", err, e))
    `CHECK(longint'(code) == ec, $sformatf("code %0d exp %0d", code, ec))
    if (enable) `CHECK(sat == es, "sat flag")
  endtask

  initial begin
    setpoint = 0; phase = 0; kp = 0; ki = 0; init_code = 12'd1500;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // disabled: output follows init_code
    step(1234);
    `CHECK(code == 12'd1500, "init code while disabled")
    // enabled, wrap-around of the error: 32000 - (-32000) wraps to -1536
    enable = 1; setpoint = 16'sd32000; kp = 16'sd4000; ki = 16'sd300;
    step(-32000);
    // random walk
    for (int i = 0; i < 300; i++) begin
      setpoint = phase_t'($urandom);
      kp = 16'($urandom_range(0, 20000));
      ki = 16'($urandom_range(0, 3000));
      if (i % 50 == 7) kp = -kp;
      step(int'($urandom));
    end
    // drive into both clamps
    kp = 16'sd30000; ki = 16'sd30000; setpoint = 16'sd20000;
    repeat (20) step(0);
    `CHECK(code == 12'd4095 && sat, "upper clamp")
    setpoint = -16'sd20000;
    repeat (20) step(0);
    `CHECK(code == 12'd0 && sat, "lower clamp")
    // disabling restores init
    enable = 0; init_code = 12'd777;
    step(5);
    `CHECK(code == 12'd777, "disable restores init")
    `FINISH
  end
endmodule
