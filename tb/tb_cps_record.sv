// Phase-recording testbench for cps_top at its default parameters: the
// measurement behind a cavity phase-noise spectrum.
//
// Both cavity loops are left open (PI disabled, PZTs held at their initial
// code), so the recorded phase is the cavity's own motion. The plant gives
// each cavity a known phase tone on top of a fixed offset: cavity c's j-th
// measurement sees phi0[c] + TONE_A * sin(2*pi*BIN[c]*j/NFFT), plus a few
// LSB of random ADC noise. The trigger runs for more than two full turns
// of the 1024-record circular buffer. Meanwhile a second host process
// drains the record buffer in batches over the host bus, as a host program
// would.
//
// Checks:
//   - no record is lost or repeated. Every trigger number appears once and
//     in order, the cavities alternate, and the host never falls more than
//     one buffer depth behind.
//   - each record's phase matches the phase the plant presented for that
//     measurement, to within 60 LSB (0.33 deg).
//   - after removing the mean and applying a Hann window, the DFT of each
//     cavity's 1024-sample phase series peaks at that cavity's tone bin,
//     and every bin more than 3 away from it is over 30 dB below the peak.
// Spectrum estimation itself is host software. Here it only shows that the
// recorded series keeps its timing.
`include "tb_util.svh"
module tb_cps_record;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real AMPL = 1500.0, CC = 16000.0, TONE_A = 0.2;
  localparam int  BURST_WORD = 39, BURST_LANE = 3;
  localparam int  PERIOD = 160;      // trigger period in clk cycles
  localparam int  NFFT = 1024;       // samples per cavity analysed
  localparam int  NT = 2 * NFFT + 200;
  localparam int  DEPTH = 1024;      // cps_top REC_DEPTH default
  localparam int  BIN [2] = '{64, 100};

  logic clk = 0, rst = 1, trig_in = 0;
  stream_t adc_a, adc_b, dac_am, dac_pm;
  logic [0:0] sw_sel;
  logic sdac_sclk, sdac_sync_n, sdac_din;
  logic host_we = 0, host_re = 0;
  logic [15:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;

  cps_top dut (.*);

  always #10 clk = ~clk;    // 50 MHz

  // ------------------------------------------------------------- plant
  real phi0 [2] = '{0.7, -2.2};
  real cur_phi = 0.0;           // phase shown for the current burst
  real truth [2][NT];           // phase shown for each measurement
  int  nm [2] = '{0, 0};        // measurements per cavity so far
  int  m = -100000;             // cycles since the trigger input rose

  function automatic logic [15:0] rnd16(real v);
    return 16'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  always @(posedge clk) begin
    m <= m + 1;
    for (int k = 0; k < 8; k++) begin
      int a;
      real v;
      a = 8 * (m + 1 - BURST_WORD) + k - BURST_LANE;   // registered: one word early
      v = 20.0;
      if (a >= 0 && a < 13)
        v = AMPL * $cos(2.0 * PI * real'(a) / 13.0 + cur_phi);
      v = v + real'(int'($urandom_range(6)) - 3);
      adc_b[k*16 +: 16] <= rnd16(v);
    end
  end
  assign adc_a = '0;

  task automatic fire();
    int c;
    c = int'(sw_sel);
    cur_phi = phi0[c] + TONE_A * $sin(2.0 * PI * real'(BIN[c]) * real'(nm[c]) / real'(NFFT));
    truth[c][nm[c]] = cur_phi;
    nm[c]++;
    @(posedge clk); #1 trig_in = 1; m = 0;
    repeat (20) @(posedge clk);
    #1 trig_in = 0;
    repeat (PERIOD - 21) @(posedge clk);
  endtask

  // ------------------------------------------------------------- host bus
  task automatic hw(int addr, int data);
    @(posedge clk); #1 host_we = 1; host_addr = 16'(addr); host_wdata = 32'(data);
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic hr(int addr, output logic [31:0] data);
    @(posedge clk); #1 host_re = 1; host_addr = 16'(addr);
    @(posedge clk); #1 host_re = 0; data = host_rdata;
  endtask

  function automatic real lsb_to_rad(logic [15:0] p);
    return 2.0 * PI * real'(int'(signed'(p))) / 65536.0;
  endfunction

  function automatic int rad_to_lsb(real rad);
    real w;
    w = rad / (2.0 * PI);
    w = w - $floor(w + 0.5);
    return $rtoi(w * 65536.0 + (w >= 0 ? 0.5 : -0.5));
  endfunction

  // ------------------------------------------------------------- drain
  real ph [2][NT];              // recorded phase per cavity, in order
  int  nr [2] = '{0, 0};
  int  next = 0;                // next record index to read
  int  lost = 0, tag_errs = 0, alt_errs = 0, ph_errs = 0, max_lag = 0;
  logic [15:0] last_tag;
  int  last_cav = -1;
  bit  running = 1;

  task automatic drain();
    logic [31:0] tot, lo, hi;
    hr(16'h002A, tot);
    if (int'(tot) - next > max_lag) max_lag = int'(tot) - next;
    if (int'(tot) - next > DEPTH) begin
      lost += int'(tot) - next - DEPTH;
      next = int'(tot) - DEPTH;
    end
    while (next < int'(tot)) begin
      int e, c, j, d;
      e = next % DEPTH;
      hr(16'h6000 + 2 * e,     lo);
      hr(16'h6000 + 2 * e + 1, hi);
      // hi = {trigger[15:0], saturated, cavity[2:0], code[11:0]}
      // lo = {error[15:0], phase[15:0]}
      c = int'(hi[14:12]);
      if (next > 0 && hi[31:16] != 16'(last_tag + 1)) tag_errs++;
      if (c == last_cav || c > 1) alt_errs++;
      last_tag = hi[31:16];
      last_cav = c;
      if (c <= 1) begin
        j = nr[c];
        ph[c][j] = lsb_to_rad(lo[15:0]);
        d = int'(phase_t'(lo[15:0] - 16'(rad_to_lsb(truth[c][j]))));
        if (d > 60 || d < -60) begin
          ph_errs++;
          if (ph_errs < 5)
            $display("record %0d cavity %0d sample %0d: phase %0d, expected %0d",
                     next, c, j, int'(signed'(lo[15:0])), rad_to_lsb(truth[c][j]));
        end
        nr[c]++;
      end
      next++;
    end
  endtask

  // ------------------------------------------------------------- spectrum
  // Power of the Hann-windowed, mean-removed series at bin b.
  function automatic real power(int c, int b, real mean);
    real re, im, w, x;
    re = 0.0; im = 0.0;
    for (int j = 0; j < NFFT; j++) begin
      w = 0.5 * (1.0 - $cos(2.0 * PI * real'(j) / real'(NFFT)));
      x = w * (ph[c][j] - mean);
      re += x * $cos(2.0 * PI * real'(b * j) / real'(NFFT));
      im -= x * $sin(2.0 * PI * real'(b * j) / real'(NFFT));
    end
    return re * re + im * im;
  endfunction

  initial begin
    repeat (1500000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    `FINISH
  end

  initial begin
    logic [31:0] r;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    hw(16'h0001, BURST_WORD - 4);   // capture delay (internal trigger is 3 cycles late)
    hw(16'h0002, BURST_LANE);       // pulse offset
    for (int c = 0; c < 2; c++) begin
      hw(16'h0010 + 4 * c, 0);      // intended phase (unused: loop open)
      hw(16'h0013 + 4 * c, 2048);   // PZT held at mid-scale
      for (int k = 0; k < 13; k++) begin
        hw(16'h1000 + c * 32 + k * 2,     $rtoi(CC * $cos(2.0 * PI * k / 13.0)));
        hw(16'h1000 + c * 32 + k * 2 + 1, $rtoi(-CC * $sin(2.0 * PI * k / 13.0)));
      end
    end
    hw(16'h0000, 0);                // both loops open, bias off
    fork
      begin
        for (int t = 0; t < NT; t++) fire();
        running = 0;
      end
      begin
        while (running) begin
          repeat (300 * PERIOD) @(posedge clk);
          drain();
        end
      end
    join
    repeat (PERIOD) @(posedge clk);
    drain();

    hr(16'h0020, r);
    `CHECK(int'(r) == NT, $sformatf("triggers %0d", r))
    hr(16'h002A, r);
    `CHECK(int'(r) == NT, $sformatf("records written %0d", r))
    `CHECK(next == NT, $sformatf("records read %0d", next))
    `CHECK(NT > 2 * DEPTH, "buffer wrapped at least twice")
    `CHECK(lost == 0, $sformatf("records overwritten before read %0d", lost))
    `CHECK(max_lag > 300 && max_lag < DEPTH, $sformatf("host lag %0d records", max_lag))
    `CHECK(tag_errs == 0, $sformatf("trigger-number gaps %0d", tag_errs))
    `CHECK(alt_errs == 0, $sformatf("cavity alternation errors %0d", alt_errs))
    `CHECK(nr[0] == nm[0] && nr[1] == nm[1], "one record per measurement")
    `CHECK(ph_errs == 0, $sformatf("record phase errors %0d", ph_errs))
    hr(16'h002D, r);
    `CHECK(r[4:3] == 2'b01, $sformatf("record-buffer wrap flags %b (cavity set, bias clear)", r[4:3]))
    for (int c = 0; c < 2; c++) begin
      real mean, pk, side;
      int  arg;
      mean = 0.0;
      for (int j = 0; j < NFFT; j++) mean += ph[c][j];
      mean = mean / real'(NFFT);
      pk = 0.0; side = 0.0; arg = -1;
      for (int b = 1; b < NFFT / 2; b++) begin
        real p;
        p = power(c, b, mean);
        if (p > pk) begin pk = p; arg = b; end
      end
      for (int b = 1; b < NFFT / 2; b++)
        if (b < BIN[c] - 3 || b > BIN[c] + 3) begin
          real p;
          p = power(c, b, mean);
          if (p > side) side = p;
        end
      `CHECK(arg == BIN[c], $sformatf("cavity %0d spectrum peak at bin %0d", c, arg))
      `CHECK(side < pk / 1000.0, $sformatf("cavity %0d spurious/peak %e", c, side / pk))
      `CHECK(mean > phi0[c] - 0.01 && mean < phi0[c] + 0.01,
             $sformatf("cavity %0d mean phase %f", c, mean))
      $display("cavity %0d: peak bin %0d, worst other bin %0.1f dB below", c, arg,
               10.0 * $log10(pk / side));
    end
    $display("records: %0d written, %0d read, host lag up to %0d", NT, next, max_lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
