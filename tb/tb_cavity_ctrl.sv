// Testbench for cavity_ctrl with a model of two optical cavities in the
// loop. Each cavity's round-trip phase is phi0 + KAPPA * (PZT code - 2048);
// when the analog switch selects it, its 13 pulses appear on the ADC as
// A*cos(2*pi*k/13 + phi). With calibrated vectors a_k = C*cos(2*pi*k/13),
// b_k = -C*sin(2*pi*k/13) the dot product is proportional to exp(i*phi),
// so the measured phase must equal the model phase. The testbench checks
// the open-loop phase measurement, the cavity alternation (switch, DAC
// channel, record), the done latency, and that both PI loops pull their
// cavities to their intended phases.
`include "tb_util.svh"
module tb_cavity_ctrl;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real KAPPA = 2.0 * PI * 1.5 / 4096.0;   // rad per PZT code
  localparam int  DELAY = 5, OFF = 7;
  localparam real AMPL = 1500.0, C = 16000.0;

  logic clk = 0, rst = 1, trig = 0, abort = 0;
  stream_t adc;
  logic [1:0] enable;
  logic [15:0] cap_delay;
  logic [4:0] pulse_offset;
  phase_t [1:0] setpoint;
  logic [1:0][15:0] kp, ki;
  sdac_t [1:0] init_code;
  logic coef_we;
  logic [5:0] coef_addr;
  coef_t coef_wdata;
  logic [0:0] sw_sel, rec_cav;
  logic sdac_valid, done, rec_sat;
  sdac_req_t sdac_req;
  phase_t rec_phase, rec_err;
  sdac_t rec_code;
  logic [32:0] rec_amp;
  phase_t [1:0] phase_out;
  sdac_t [1:0] code_out;

  cavity_ctrl dut (.*);

  real phi0 [2] = '{1.0, -2.0};
  int  pzt  [2] = '{2048, 2048};
  int  n = -1000;
  int  sel_at_trig;

  always #5 clk = ~clk;
  always @(posedge clk) n <= trig ? 0 : n + 1;

  function automatic real cav_phase(int c);
    return phi0[c] + KAPPA * real'(pzt[c] - 2048);
  endfunction

  // Photodiode + switch + ADC model.
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      int a;
      real v;
      a = 8 * (n - DELAY) + k;
      v = 37.0 * real'(k % 3);                 // background
      if (a >= OFF && a < OFF + 13)
        v = AMPL * $cos(2.0 * PI * real'(a - OFF) / 13.0 + cav_phase(int'(sw_sel)));
      adc[k*16 +: 16] = 16'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
    end
  end

  // PZT drive from the slow-DAC requests.
  always @(posedge clk) if (sdac_valid && !rst) begin
    `CHECK(sdac_req.ch == 3'(1 + sel_at_trig), $sformatf("DAC channel %0d", sdac_req.ch))
    pzt[sdac_req.ch - 1] = int'(sdac_req.code);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    `FINISH
  end

  function automatic int to_lsb(real rad);
    real w;
    w = rad / (2.0 * PI);
    w = w - $floor(w + 0.5);
    return $rtoi(w * 65536.0 + (w >= 0 ? 0.5 : -0.5));
  endfunction

  task automatic wcoef(int c, int k, bit im, int v);
    @(posedge clk); #1 coef_we = 1; coef_addr = {1'(c), 4'(k), im}; coef_wdata = 16'(v);
    @(posedge clk); #1 coef_we = 0;
  endtask

  task automatic one_trigger(output int dphase);
    int s, expect_lsb;
    real ph;
    @(posedge clk); #1;
    sel_at_trig = int'(sw_sel);
    ph = cav_phase(sel_at_trig);
    expect_lsb = to_lsb(ph);
    trig = 1;
    @(posedge clk); #1 trig = 0;
    s = n;
    while (!done) begin @(posedge clk); #1; end
    // n counts from 0 in the cycle after trig: done is DELAY + 40 cycles after it
    `CHECK(n == DELAY + 39, $sformatf("done at %0d", n))
    `CHECK(int'(rec_cav) == sel_at_trig, "record cavity")
    `CHECK(int'(sw_sel) == 1 - sel_at_trig, "switch moved to the other cavity")
    dphase = int'(phase_t'(rec_phase - phase_t'(expect_lsb)));
    `CHECK(dphase < 60 && dphase > -60, $sformatf("phase %0d exp %0d", rec_phase, expect_lsb))
    `CHECK(rec_err == phase_t'(setpoint[sel_at_trig] - rec_phase), "record error")
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int dp, e0, e1;
    enable = 0; cap_delay = 16'(DELAY); pulse_offset = 5'(OFF);
    setpoint[0] = phase_t'(to_lsb(0.5)); setpoint[1] = phase_t'(to_lsb(-1.0));
    kp = {16'd500, 16'd500}; ki = {16'd1500, 16'd1500};
    init_code = {12'd2048, 12'd2048};
    coef_we = 0; coef_addr = 0; coef_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 13; k++) begin
        wcoef(c, k, 0, $rtoi(C * $cos(2.0 * PI * k / 13.0)));
        wcoef(c, k, 1, $rtoi(-C * $sin(2.0 * PI * k / 13.0)));
      end
    // open loop: phase measurement at several PZT positions
    for (int i = 0; i < 6; i++) begin
      init_code = {12'(1000 + 500 * i), 12'(3000 - 400 * i)};
      one_trigger(dp);
    end
    // closed loop
    init_code = {12'd2048, 12'd2048};
    one_trigger(dp);
    one_trigger(dp);
    enable = 2'b11;
    for (int i = 0; i < 80; i++) one_trigger(dp);
    e0 = int'(phase_t'(setpoint[0] - phase_t'(to_lsb(cav_phase(0)))));
    e1 = int'(phase_t'(setpoint[1] - phase_t'(to_lsb(cav_phase(1)))));
    `CHECK(e0 < 100 && e0 > -100, $sformatf("cavity 0 locked, error %0d", e0))
    `CHECK(e1 < 100 && e1 > -100, $sformatf("cavity 1 locked, error %0d", e1))
    `CHECK(pzt[0] != 2048 && pzt[1] != 2048, "both PZTs moved")
    // abort returns to idle: a trigger then works normally
    @(posedge clk); #1 trig = 1; @(posedge clk); #1 trig = 0;
    repeat (8) @(posedge clk); #1 abort = 1; @(posedge clk); #1 abort = 0;
    repeat (60) @(posedge clk);
    one_trigger(dp);
    `FINISH
  end
endmodule
