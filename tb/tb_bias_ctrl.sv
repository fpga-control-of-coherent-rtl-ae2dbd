// Testbench for bias_ctrl (n counts cycles from 0 in the cycle after the
// trigger): test-step placement and saturation in the DAC
// stream, the three ADC window sums, the proportional bias step, both
// modulo resets, the at_min flag and the update timing.
`include "tb_util.svh"
module tb_bias_ctrl;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  localparam int S = 10, L = 4, D = 3;
  logic clk = 0, rst = 1, enable = 0, trig = 0;
  logic signed [15:0] dither, kp;
  logic [15:0] step_start, step_len;
  logic [7:0] adc_lat;
  sdac_t wrap_step, init_code, bias_code;
  stream_t dac_in, dac_out, adc;
  logic update, done, wrapped, at_min;
  acc_t r_plus, r_zero, r_minus;
  int n = -1000;             // cycles since the last trigger
  int vp, v0, vm;            // photodiode level per test step
  int dac_errs = 0;

  bias_ctrl dut (.*);

  always #5 clk = ~clk;

  // Photodiode model: level per ADC window (lane k adds k), junk elsewhere.
  always_comb begin
    int t, v;
    t = n;
    if (t >= S + D && t < S + D + L)            v = vp;
    else if (t >= S + D + L && t < S + D + 2*L) v = v0;
    else if (t >= S + D + 2*L && t < S + D + 3*L) v = vm;
    else v = 1500;
    for (int k = 0; k < 8; k++) adc[k*16 +: 16] = 16'(v + k);
  end

  function automatic int lane16(stream_t w, int k);
    logic signed [15:0] v;
    v = w[k*16 +: 16];
    return int'(v);
  endfunction

  // DAC stream check: the expected step is worked out from n.
  always @(negedge clk) if (!rst && enable && n >= 0) begin
    int t, st;
    t = n;
    if (t >= S && t < S + L)              st = dither;
    else if (t >= S + 2*L && t < S + 3*L) st = -dither;
    else                                  st = 0;
    for (int k = 0; k < 8; k++) begin
      int e;
      e = lane16(dac_in, k) + st;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      checks++;
      if (lane16(dac_out, k) != e) begin
        failures++;
        if (dac_errs++ < 5) $display("FAIL dac lane %0d n=%0d: %0d exp %0d", k, n,
                                     lane16(dac_out, k), e);
      end
    end
  end

  always @(posedge clk) n <= trig ? 0 : n + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `FINISH
  end

  task automatic cycle_once(int p, int z, int m, output int tupd);
    longint rp, rm, cand;
    int b0;
    vp = p; v0 = z; vm = m;
    b0 = bias_code;
    rp = L * (8 * p + 28);
    rm = L * (8 * m + 28);
    cand = longint'(b0) - ((longint'(kp) * (rp - rm)) >>> 16);
    @(posedge clk); #1 trig = 1;
    @(posedge clk); #1 trig = 0;
    while (!update) begin @(posedge clk); #1; end
    tupd = n;
    `CHECK(n == S + D + 3*L + 2, $sformatf("update at %0d", n))
    `CHECK(done, "done with update")
    `CHECK(r_plus == acc_t'(rp), $sformatf("R+ %0d exp %0d", r_plus, rp))
    `CHECK(r_zero == acc_t'(L * (8 * z + 28)), "R0")
    `CHECK(r_minus == acc_t'(rm), "R-")
    if (cand > 4095) begin
      `CHECK(bias_code == sdac_t'(cand - wrap_step) && wrapped, $sformatf("wrap down: %0d from %0d", bias_code, cand))
    end else if (cand < 0) begin
      `CHECK(bias_code == sdac_t'(cand + wrap_step) && wrapped, $sformatf("wrap up: %0d from %0d", bias_code, cand))
    end else begin
      `CHECK(bias_code == sdac_t'(cand) && !wrapped, $sformatf("bias %0d exp %0d", bias_code, cand))
    end
    `CHECK(at_min == (z < p && z < m), "at_min")
    repeat (5) @(posedge clk);
  endtask

  initial begin
    int tu;
    dither = 16'sd1000; kp = 16'sd2000; step_start = 16'(S); step_len = 16'(L);
    adc_lat = 8'(D); wrap_step = 12'd2048; init_code = 12'd2048;
    for (int k = 0; k < 8; k++) dac_in[k*16 +: 16] = 16'(100 * k - 300);
    dac_in[7*16 +: 16] = 16'sd32000;            // saturates on the plus step
    dac_in[6*16 +: 16] = -16'sd32000;           // saturates on the minus step
    vp = 0; v0 = 0; vm = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // disabled: no update, code = init
    @(posedge clk); #1 trig = 1; @(posedge clk); #1 trig = 0;
    repeat (40) @(posedge clk); #1;
    `CHECK(bias_code == 12'd2048, "init while disabled")
    enable = 1;
    cycle_once(300, 100, 200, tu);    // above the minimum: bias goes down
    `CHECK(bias_code < 12'd2048, "bias decreased")
    cycle_once(200, 100, 300, tu);    // below: bias goes up
    cycle_once(250, 100, 250, tu);    // balanced: no change
    // walk up to the DAC limit to force a modulo reset downwards
    kp = 16'sd30000;
    for (int i = 0; i < 12 && !wrapped; i++) cycle_once(0, 10, 1500, tu);
    `CHECK(wrapped, "reached the upper DAC limit")
    for (int i = 0; i < 12 && !(wrapped && bias_code > 12'd2000); i++) cycle_once(1500, 10, 0, tu);
    `CHECK(wrapped, "reached the lower DAC limit")
    `FINISH
  end
endmodule
