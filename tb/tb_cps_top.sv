// End-to-end testbench for cps_top at its default parameters.
//
// Plant models close both loops:
//   - AD5628 model decodes the SPI port: channel 0 = modulator bias,
//     channels 1 and 2 = cavity PZTs.
//   - Amplitude modulator + photodiode on ADC A: each lane reads
//     PMAX * (1 - cos(psi)) / 2 with psi = 2*pi*(bias - null)/2048 +
//     2*pi*dac/32768, the fast-DAC word delayed by LAT cycles. The null
//     drifts upwards so the bias must eventually pass the DAC limit and
//     take a modulo reset.
//   - Two cavities on ADC B through the analog switch: phase phi0 +
//     KAPPA*(pzt - 2048); the 13-pulse burst reaches the ADC at a fixed
//     delay after the trigger input, as A*cos(2*pi*k/13 + phi).
// The host side programs every register over the host bus, loads the
// calibrated vectors and the DAC waveforms, arms the ADC snapshots and
// reads status, snapshots and circular-buffer records back.
// Each mechanism is counted and must occur at least once: trigger, bias
// update, bias at minimum, modulo reset, cavity 0 and 1 service, lock of
// both cavities, overrun, loop timeout, slow-DAC contention, waveform
// playback on both DACs, ADC snapshot, circular-buffer records.
`include "tb_util.svh"
module tb_cps_top;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real KAPPA = 2.0 * PI * 1.5 / 4096.0;
  localparam real PMAX = 2000.0, AMPL = 1500.0, CC = 16000.0;
  localparam int  LAT = 8;           // fast DAC -> optics -> fast ADC
  localparam int  BURST_WORD = 39;   // burst position after trigger input
  localparam int  BURST_LANE = 3;
  localparam int  PERIOD = 320;      // trigger period in clk cycles

  logic clk = 0, rst = 1, trig_in = 0;
  stream_t adc_a, adc_b, dac_am, dac_pm;
  logic [0:0] sw_sel;
  logic sdac_sclk, sdac_sync_n, sdac_din;
  logic host_we = 0, host_re = 0;
  logic [15:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;

  cps_top dut (.*);

  logic [11:0] code [8];
  int frames, bad_frames;
  logic [31:0] last_frame;
  ad5628_model u_sdac (.sclk(sdac_sclk), .sync_n(sdac_sync_n), .din(sdac_din),
                       .code, .frames, .bad_frames, .last_frame);

  always #10 clk = ~clk;    // 50 MHz

  // ------------------------------------------------------------- plant
  real null_code = 2100.0;      // drifting bias null, in slow-DAC codes
  real phi0 [2] = '{0.7, -2.2};
  int  m = -100000;             // cycles since the trigger input rose
  stream_t dac_pipe [LAT];

  always @(posedge clk) begin
    dac_pipe[0] <= dac_am;
    for (int i = 1; i < LAT; i++) dac_pipe[i] <= dac_pipe[i-1];
  end

  function automatic real cav_phase(int c);
    return phi0[c] + KAPPA * real'(int'(code[1 + c]) - 2048);
  endfunction

  function automatic logic [15:0] rnd16(real v);
    return 16'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic signed [15:0] d;
      real psi, v;
      int a;
      d = dac_pipe[LAT-1][k*16 +: 16];
      psi = 2.0 * PI * (real'(code[0]) - null_code) / 2048.0 +
            2.0 * PI * real'(d) / 32768.0;
      adc_a[k*16 +: 16] = rnd16(PMAX * (1.0 - $cos(psi)) / 2.0);
      a = 8 * (m - BURST_WORD) + k - BURST_LANE;
      v = 20.0;
      if (a >= 0 && a < 13)
        v = AMPL * $cos(2.0 * PI * real'(a) / 13.0 + cav_phase(int'(sw_sel)));
      adc_b[k*16 +: 16] = rnd16(v);
    end
  end

  // ------------------------------------------------------------- host bus
  task automatic hw(int addr, int data);
    @(posedge clk); #1 host_we = 1; host_addr = 16'(addr); host_wdata = 32'(data);
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic hr(int addr, output logic [31:0] data);
    @(posedge clk); #1 host_re = 1; host_addr = 16'(addr);
    @(posedge clk); #1 host_re = 0; data = host_rdata;
  endtask

  // ------------------------------------------------------------- counters
  int n_trig = 0, n_bias_upd = 0, n_atmin = 0, n_wrap = 0, n_cav [2] = '{0, 0};
  int n_am_play = 0, n_pm_play = 0, pm_errs = 0;
  logic [15:0] pm_img [32];

  // PM playback: every non-idle word must be the next word of the written
  // waveform. AM playback: the first burst word (lane 0 = 16384) is seen
  // once per trigger.
  always @(posedge clk) if (!rst && dac_pm != '0) begin
    int w;
    w = n_pm_play % 4;
    n_pm_play++;
    for (int k = 0; k < 8; k++) if (dac_pm[k*16 +: 16] != pm_img[8*w + k]) pm_errs++;
  end
  always @(posedge clk) if (!rst && dac_am[15:0] == 16'd16384) n_am_play++;

  always @(posedge clk) m <= m + 1;

  task automatic fire(int gap);
    @(posedge clk); #1 trig_in = 1; m = 0;
    repeat (20) @(posedge clk);
    #1 trig_in = 0;
    repeat (gap - 21) @(posedge clk);
  endtask

  function automatic int to_lsb(real rad);
    real w;
    w = rad / (2.0 * PI);
    w = w - $floor(w + 0.5);
    return $rtoi(w * 65536.0 + (w >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    `FINISH
  end

  initial begin
    logic [31:0] r, r2, last_bias_rec;
    int e0, e1, dly;
    for (int i = 0; i < 8; i++) code[i] = 12'd0;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    // The slow DAC powers up at 0; start both PZTs mid-scale via the loop's
    // initial code (written once the first update goes out).
    // --- registers
    dly = BURST_WORD - 4;           // internal trigger is 3 cycles late
    hw(16'h0001, dly);              // capture delay
    hw(16'h0002, BURST_LANE);       // pulse offset in the capture RAM
    hw(16'h0003, 1000);             // bias dither
    hw(16'h0004, 64);               // bias step start
    hw(16'h0005, 16);               // bias step length
    hw(16'h0006, LAT);              // bias ADC latency
    hw(16'h0007, 256);              // bias gain
    hw(16'h0008, 2048);             // wrap step = one transfer period
    hw(16'h0009, 2048);             // initial bias
    hw(16'h000A, 4);                // DAC playback words
    hw(16'h0010, to_lsb(0.4));  hw(16'h0011, 500); hw(16'h0012, 1500); hw(16'h0013, 2048);
    hw(16'h0014, to_lsb(-1.2)); hw(16'h0015, 500); hw(16'h0016, 1500); hw(16'h0017, 2048);
    hr(16'h0001, r);
    `CHECK(r == 32'(dly), "register read-back")
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 13; k++) begin
        hw(16'h1000 + c * 32 + k * 2,     $rtoi(CC * $cos(2.0 * PI * k / 13.0)));
        hw(16'h1000 + c * 32 + k * 2 + 1, $rtoi(-CC * $sin(2.0 * PI * k / 13.0)));
      end
    // AM burst: 13 full-drive samples; PM: a phase staircase
    for (int s = 0; s < 32; s++) begin
      hw(16'h4000 + s, (s < 13) ? 16384 : 0);
      pm_img[s] = 16'(s * 1000 - 9000);
      hw(16'h5000 + s, pm_img[s]);
    end
    hw(16'h0000, 32'b111);          // bias and both cavities on
    // --- run the loops
    for (int t = 0; t < 400; t++) begin
      if (t == 5) hw(16'h000B, 1);  // arm the ADC snapshots
      fire(PERIOD);
      null_code += 6.0;             // thermal drift of the modulator null
      hr(16'h0024, r);
      if (r[17]) n_wrap++;
      if (r[16]) n_atmin++;
    end
    // --- overrun: a second trigger edge while the loop is busy
    @(posedge clk); #1 trig_in = 1; m = 0;
    repeat (12) @(posedge clk); #1 trig_in = 0;
    repeat (6) @(posedge clk); #1 trig_in = 1;
    repeat (10) @(posedge clk); #1 trig_in = 0;
    repeat (PERIOD) @(posedge clk);
    // --- timeout: bias windows placed beyond the 50000-cycle budget
    hw(16'h0004, 60000);
    fire(50100);
    hw(16'h0004, 64);
    fire(PERIOD);
    // --- status
    hr(16'h0020, r);  n_trig = int'(r);
    `CHECK(n_trig == 403, $sformatf("triggers %0d", n_trig))
    hr(16'h0021, r);
    `CHECK(r >= 1, $sformatf("overruns %0d", r))
    hr(16'h0022, r);
    `CHECK(r == 1, $sformatf("timeouts %0d", r))
    hr(16'h0023, r);
    `CHECK(r > 100 && r < 400, $sformatf("loop length %0d", r))
    hr(16'h002B, r);  n_bias_upd = int'(r);
    `CHECK(n_bias_upd >= 400, $sformatf("bias updates %0d", n_bias_upd))
    hr(16'h002A, r);
    `CHECK(r == 403, $sformatf("cavity records %0d", r))
    hr(16'h002C, r);
    `CHECK(r[15:0] >= 1, $sformatf("slow-DAC waits %0d", r[15:0]))
    `CHECK(bad_frames == 0, "no short SPI frames")
    // bias near the (wrapped) null
    begin
      real off;
      off = real'(code[0]) - null_code;
      off = off - 2048.0 * $floor(off / 2048.0 + 0.5);
      `CHECK(off < 15.0 && off > -15.0, $sformatf("bias %0d off the null by %f", code[0], off))
    end
    // cavities locked
    e0 = int'(phase_t'(16'(to_lsb(0.4))  - 16'(to_lsb(cav_phase(0)))));
    e1 = int'(phase_t'(16'(to_lsb(-1.2)) - 16'(to_lsb(cav_phase(1)))));
    `CHECK(e0 < 150 && e0 > -150, $sformatf("cavity 0 error %0d", e0))
    `CHECK(e1 < 150 && e1 > -150, $sformatf("cavity 1 error %0d", e1))
    // records: the newest two cavity records cover both cavities
    hr(16'h6000 + 2 * 402 + 1, r);
    hr(16'h6000 + 2 * 401 + 1, r2);
    // upper half: {trigger[15:0], saturated, cavity[2:0], code[11:0]}
    if (r[14:12] == 3'd0 || r[14:12] == 3'd1) n_cav[r[14:12]]++;
    if (r2[14:12] == 3'd0 || r2[14:12] == 3'd1) n_cav[r2[14:12]]++;
    `CHECK(r[14:12] != r2[14:12], "consecutive records alternate cavities")
    `CHECK(r[31:16] == 16'(r2[31:16] + 1), "trigger tags advance")
    `CHECK(r[11:0] == code[1 + int'(r[14:12])], "record PZT code = DAC code")
    // ADC snapshot of channel A and B
    hr(16'h0029, r);
    `CHECK(r[1:0] == 2'b11, "ADC snapshots ready")
    // the snapshot starts one cycle after the internal trigger, i.e. four
    // cycles after the trigger input rose
    begin
      int peak;
      peak = 0;
      for (int k = 0; k < 13; k++) begin
        hr(16'h3000 + 8 * (BURST_WORD - 4) + BURST_LANE + k, r);
        if (int'(signed'(r[15:0])) > peak) peak = int'(signed'(r[15:0]));
      end
      `CHECK(peak > 1300, $sformatf("ADC B snapshot holds the burst, peak %0d", peak))
    end
    hr(16'h3000 + 8 * 200, r2);                                  // background
    `CHECK(r2 == 32'd20, $sformatf("ADC B background %0d", r2))
    // mechanisms seen
    `CHECK(n_wrap >= 1, $sformatf("modulo resets %0d", n_wrap))
    `CHECK(n_atmin >= 100, $sformatf("at-minimum iterations %0d", n_atmin))
    `CHECK(n_cav[0] >= 1 && n_cav[1] >= 1, "both cavities served")
    `CHECK(n_am_play >= 400, $sformatf("AM bursts played %0d", n_am_play))
    `CHECK(n_pm_play >= 400 * 4, $sformatf("PM playback words %0d", n_pm_play))
    `CHECK(pm_errs == 0, $sformatf("PM playback errors %0d", pm_errs))
    $display("mechanisms: triggers=%0d bias_updates=%0d at_min=%0d modulo_resets=%0d overruns>=1 timeouts=1 am_bursts=%0d pm_words=%0d",
             n_trig, n_bias_upd, n_atmin, n_wrap, n_am_play, n_pm_play);
    `FINISH
  end
endmodule
