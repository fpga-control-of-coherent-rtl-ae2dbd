// cps_top: FPGA firmware for coherent pulse stacking (CPS) control.
//
// A fiber-laser oscillator at 400 MHz is cut into a 13-pulse burst by an
// amplitude modulator (AM), given per-pulse phases by a phase modulator
// (PM), and stacked into one pulse by optical cavities whose round-trip
// phase must be held. This top wires the control firmware around one
// 50 MHz processing clock, in which the 400 MS/s converters appear as
// 8-sample (128-bit) words:
//   - trig_ctrl    kHz trigger edge and loop-time budget (clock counter)
//   - dac_buf x2   host-written AM and PM waveforms, replayed per trigger
//   - bias_ctrl    adds the plus/zero/minus test steps to the AM waveform,
//                  reads fast-ADC channel A and keeps the AM bias at the
//                  transfer-function minimum
//   - cavity_ctrl  reads fast-ADC channel B through the analog switch and
//                  locks each cavity's phase in turn (capture, dot product,
//                  CORDIC, PI)
//   - slow_dac     sends bias and PZT codes to the AD5628 over SPI
//   - adc_buf x2   arm-and-trigger snapshots of both ADC channels
//   - circ_buf x2  per-trigger records of the cavity and bias loops
// and a register file on a simple synchronous host bus, which stands where
// the Gigabit-Ethernet/UDP link to the host computer would connect.
//
// Host bus: `host_we` writes `host_wdata` at `host_addr`; `host_re` returns
// `host_rdata` one cycle later. Address map (16-bit):
//   0x0000 + r   registers (see the register map below)
//   0x1000 + a   calibrated-vector write, a = {cavity, k, imaginary}
//   0x2000 + s   adc_buf A sample s (read)      0x3000 + s  adc_buf B
//   0x4000 + s   dac_buf AM sample s (write)    0x5000 + s  dac_buf PM
//   0x6000 + 2e + h   cavity record e, half h   0x7000 + ...  bias records
// Registers (read/write): 0x00 control {cav_en, bias_en}, 0x01 capture
// delay, 0x02 pulse offset, 0x03 bias dither, 0x04 bias step start, 0x05
// bias step length, 0x06 bias ADC latency, 0x07 bias gain, 0x08 bias wrap
// step, 0x09 bias initial code, 0x0A DAC playback length, 0x0B (write 1:
// arm both ADC snapshots), 0x10 + 4c + {0 setpoint, 1 kp, 2 ki, 3 initial
// code} for cavity c. Status (read): 0x20 triggers, 0x21 overruns, 0x22
// timeouts, 0x23 last loop length, 0x24 {wrapped, at_min, bias code}, 0x25..
// 0x27 R+, R0, R-, 0x28 slow-DAC frames, 0x29 {adcB ready, adcA ready},
// 0x2A cavity records written, 0x2B bias records written, 0x2C slow-DAC
// {replaced, waited} requests, 0x2D activity {bias records wrapped, cavity
// records wrapped, slow-DAC busy, PM playing, AM playing}, 0x30 + 4c + {0
// phase, 1 amplitude, 2 error, 3 PZT code}.
//
// Cavity record: {trigger[15:0], saturated, cavity[2:0], code[11:0], error[15:0],
// phase[15:0]}. Bias record: {trigger[15:0], at_min, wrapped, 2'b0,
// code[11:0], (R+ - R-)[31:0]}.
//
// The blocks and how data flows between them follow the design
// description; the single clock, the host bus, the address map, the record
// layouts and the slow-DAC channel numbers (bias on channel 0, cavity c on
// channel 1 + c) are this design's choices. One feedback iteration ends when
// the cavity loop and (if enabled) the bias loop have both finished.
module cps_top
  import cps_pkg::*;
#(
  parameter int unsigned NCAV       = 2,      // cavities locked in turn
  parameter int unsigned BUDGET     = 50000,  // cycles per trigger (1 kHz)
  parameter int unsigned ADC_WORDS  = 256,    // adc_buf snapshot, words
  parameter int unsigned DAC_WORDS  = 256,    // dac_buf waveform, words
  parameter int unsigned REC_DEPTH  = 1024,   // circ_buf records
  parameter int unsigned SPI_DIV    = 2       // SCLK = clk / (2*SPI_DIV)
) (
  input  logic                    clk,        // 50 MHz processing clock
  input  logic                    rst,
  input  logic                    trig_in,    // kHz trigger
  input  stream_t                 adc_a,      // AM monitor photodiode
  input  stream_t                 adc_b,      // cavity photodiodes (switched)
  output stream_t                 dac_am,     // to amplitude modulator
  output stream_t                 dac_pm,     // to phase modulator
  output logic [$clog2(NCAV)-1:0] sw_sel,     // analog switch select
  output logic                    sdac_sclk,  // AD5628 serial port
  output logic                    sdac_sync_n,
  output logic                    sdac_din,
  input  logic                    host_we,
  input  logic                    host_re,
  input  logic [15:0]             host_addr,
  input  logic [31:0]             host_wdata,
  output logic [31:0]             host_rdata
);

  localparam int unsigned BIAS_CH = 0;
  localparam int unsigned CAV_CH0 = 1;
  localparam int unsigned CW      = $clog2(NCAV);
  localparam int unsigned RW      = $clog2(REC_DEPTH);

  // ---------------------------------------------------------------- regs
  logic              bias_en;
  logic [NCAV-1:0]   cav_en;
  logic [15:0]       cap_delay;
  logic [4:0]        pulse_offset;
  logic [15:0]       b_dither, b_start, b_len, b_kp;
  logic [7:0]        b_lat;
  sdac_t             b_wrap, b_init;
  logic [15:0]       dac_len;
  logic              arm;
  phase_t [NCAV-1:0]     c_set;
  logic [NCAV-1:0][15:0] c_kp, c_ki;
  sdac_t  [NCAV-1:0]     c_init;

  logic [3:0]  region;
  logic [11:0] offs;
  assign region = host_addr[15:12];
  assign offs   = host_addr[11:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      bias_en      <= 1'b0;
      cav_en       <= '0;
      cap_delay    <= '0;
      pulse_offset <= '0;
      b_dither     <= 16'd1000;
      b_start      <= 16'd64;
      b_len        <= 16'd16;
      b_lat        <= 8'd8;
      b_kp         <= 16'd256;
      b_wrap       <= 12'd2048;
      b_init       <= 12'd2048;
      dac_len      <= 16'd4;
      arm          <= 1'b0;
      c_set        <= '0;
      c_kp         <= '0;
      c_ki         <= '0;
      c_init       <= {NCAV{12'd2048}};
    end else begin
      arm <= 1'b0;
      if (host_we && region == 4'h0) begin
        case (offs[7:0]) inside
          8'h00: {cav_en, bias_en} <= host_wdata[NCAV:0];
          8'h01: cap_delay    <= host_wdata[15:0];
          8'h02: pulse_offset <= host_wdata[4:0];
          8'h03: b_dither     <= host_wdata[15:0];
          8'h04: b_start      <= host_wdata[15:0];
          8'h05: b_len        <= host_wdata[15:0];
          8'h06: b_lat        <= host_wdata[7:0];
          8'h07: b_kp         <= host_wdata[15:0];
          8'h08: b_wrap       <= host_wdata[11:0];
          8'h09: b_init       <= host_wdata[11:0];
          8'h0A: dac_len      <= host_wdata[15:0];
          8'h0B: arm          <= host_wdata[0];
          [8'h10:8'h1F]: if (offs[3:2] < 2'(NCAV)) begin
            case (offs[1:0])
              2'd0: c_set[offs[2+:CW]]  <= host_wdata[15:0];
              2'd1: c_kp[offs[2+:CW]]   <= host_wdata[15:0];
              2'd2: c_ki[offs[2+:CW]]   <= host_wdata[15:0];
              default: c_init[offs[2+:CW]] <= host_wdata[11:0];
            endcase
          end
          default: ;
        endcase
      end
    end
  end

  // --------------------------------------------------------- trigger path
  logic        trig, busy, timeout, loop_done;
  logic [$clog2(BUDGET+1)-1:0] loop_cycles;
  logic [15:0] trig_cnt, overrun_cnt, timeout_cnt;

  trig_ctrl #(.BUDGET(BUDGET)) u_trig (
    .clk, .rst, .trig_in, .loop_done, .trig, .busy, .timeout, .loop_cycles,
    .trig_cnt, .overrun_cnt, .timeout_cnt
  );

  // ------------------------------------------------------ fast DAC path
  stream_t am_wave;
  logic    am_play, pm_play;

  dac_buf #(.WORDS(DAC_WORDS)) u_dac_am (
    .wclk(clk), .we(host_we && region == 4'h4),
    .waddr(offs[$clog2(DAC_WORDS*LANES)-1:0]), .wdata(host_wdata[15:0]),
    .rclk(clk), .rst, .trig, .len(dac_len[$clog2(DAC_WORDS+1)-1:0]),
    .dout(am_wave), .playing(am_play)
  );

  dac_buf #(.WORDS(DAC_WORDS)) u_dac_pm (
    .wclk(clk), .we(host_we && region == 4'h5),
    .waddr(offs[$clog2(DAC_WORDS*LANES)-1:0]), .wdata(host_wdata[15:0]),
    .rclk(clk), .rst, .trig, .len(dac_len[$clog2(DAC_WORDS+1)-1:0]),
    .dout(dac_pm), .playing(pm_play)
  );

  // ------------------------------------------------------------ bias loop
  sdac_t bias_code;
  logic  bias_update, bias_done, bias_wrapped, bias_at_min;
  acc_t  r_plus, r_zero, r_minus;

  bias_ctrl u_bias (
    .clk, .rst, .enable(bias_en), .trig, .dither(b_dither),
    .step_start(b_start), .step_len(b_len), .adc_lat(b_lat), .kp(b_kp),
    .wrap_step(b_wrap), .init_code(b_init), .dac_in(am_wave),
    .dac_out(dac_am), .adc(adc_a), .bias_code, .update(bias_update),
    .done(bias_done), .wrapped(bias_wrapped), .at_min(bias_at_min),
    .r_plus, .r_zero, .r_minus
  );

  // ---------------------------------------------------------- cavity loop
  logic       cav_done, cav_sdac_valid, rec_sat;
  sdac_req_t  cav_sdac_req;
  logic [CW-1:0] rec_cav;
  phase_t     rec_phase, rec_err;
  sdac_t      rec_code;
  logic [ACC_W:0] rec_amp;
  phase_t [NCAV-1:0] cav_phase;
  sdac_t  [NCAV-1:0] cav_code;
  logic [NCAV-1:0][ACC_W:0] cav_amp;

  cavity_ctrl #(.NCAV(NCAV), .CH0(CAV_CH0)) u_cav (
    .clk, .rst, .trig, .abort(timeout), .adc(adc_b), .enable(cav_en),
    .cap_delay, .pulse_offset, .setpoint(c_set), .kp(c_kp), .ki(c_ki),
    .init_code(c_init), .coef_we(host_we && region == 4'h1),
    .coef_addr(offs[CW+$clog2(NPULSE):0]), .coef_wdata(host_wdata[15:0]),
    .sw_sel, .sdac_valid(cav_sdac_valid), .sdac_req(cav_sdac_req),
    .done(cav_done), .rec_cav, .rec_phase, .rec_err, .rec_code, .rec_amp,
    .rec_sat, .phase_out(cav_phase), .code_out(cav_code)
  );

  always_ff @(posedge clk) begin
    if (rst) cav_amp <= '0;
    else if (cav_done) cav_amp[rec_cav] <= rec_amp;
  end

  // End of one iteration: cavity loop done and bias loop done if enabled.
  logic cav_fin, bias_fin;
  always_ff @(posedge clk) begin
    if (rst || trig) begin
      cav_fin  <= 1'b0;
      bias_fin <= 1'b0;
    end else begin
      if (cav_done)  cav_fin  <= 1'b1;
      if (bias_done) bias_fin <= 1'b1;
    end
  end
  // The flags of the previous iteration are still set in the trigger cycle
  // itself, so that cycle never ends an iteration.
  assign loop_done = busy && !trig && (cav_fin || cav_done) &&
                     (!bias_en || bias_fin || bias_done);

  // ------------------------------------------------------------ slow DAC
  logic [1:0]      sd_valid;
  sdac_req_t [1:0] sd_req;
  logic [15:0]     sd_frames, sd_waits, sd_drops;
  logic            sd_busy;

  assign sd_valid = {cav_sdac_valid, bias_update};
  assign sd_req   = {cav_sdac_req, sdac_req_t'{ch: SDAC_CH_W'(BIAS_CH), code: bias_code}};

  slow_dac #(.NREQ(2), .DIV(SPI_DIV)) u_sdac (
    .clk, .rst, .req_valid(sd_valid), .req(sd_req), .sclk(sdac_sclk),
    .sync_n(sdac_sync_n), .sdin(sdac_din), .spi_busy(sd_busy),
    .frames(sd_frames), .waits(sd_waits), .drops(sd_drops)
  );

  // ------------------------------------------------------ ADC snapshots
  logic [LANE_W-1:0] adca_rd, adcb_rd;
  logic              adca_rdy, adcb_rdy;

  adc_buf #(.WORDS(ADC_WORDS)) u_adc_a (
    .wclk(clk), .rst, .arm, .trig, .din(adc_a), .ready(adca_rdy),
    .capturing(), .rclk(clk), .raddr(offs[$clog2(ADC_WORDS*LANES)-1:0]),
    .rdata(adca_rd)
  );

  adc_buf #(.WORDS(ADC_WORDS)) u_adc_b (
    .wclk(clk), .rst, .arm, .trig, .din(adc_b), .ready(adcb_rdy),
    .capturing(), .rclk(clk), .raddr(offs[$clog2(ADC_WORDS*LANES)-1:0]),
    .rdata(adcb_rd)
  );

  // ---------------------------------------------------- circular buffers
  logic [63:0]   cav_rec, bias_rec, cav_rd, bias_rd;
  logic [31:0]   cav_total, bias_total;
  logic [RW-1:0] cav_wptr, bias_wptr;
  logic          cav_rec_wrapped, bias_rec_wrapped;

  assign cav_rec  = {trig_cnt, rec_sat, 3'(rec_cav), rec_code, rec_err, rec_phase};
  assign bias_rec = {trig_cnt, bias_at_min, bias_wrapped, 2'b00, bias_code,
                     r_plus - r_minus};

  circ_buf #(.W(64), .DEPTH(REC_DEPTH)) u_rec_cav (
    .clk, .rst, .we(cav_done), .din(cav_rec), .wptr(cav_wptr),
    .total(cav_total), .wrapped(cav_rec_wrapped), .rclk(clk), .raddr(offs[1 +: RW]),
    .rdata(cav_rd)
  );

  // The bias record is written one cycle after the update, when the
  // at_min and wrapped flags of that update are valid.
  logic bias_rec_we;
  always_ff @(posedge clk) begin
    if (rst) bias_rec_we <= 1'b0;
    else     bias_rec_we <= bias_update;
  end

  circ_buf #(.W(64), .DEPTH(REC_DEPTH)) u_rec_bias (
    .clk, .rst, .we(bias_rec_we), .din(bias_rec), .wptr(bias_wptr),
    .total(bias_total), .wrapped(bias_rec_wrapped), .rclk(clk), .raddr(offs[1 +: RW]),
    .rdata(bias_rd)
  );

  // ------------------------------------------------------------ read mux
  logic [31:0] reg_rd;
  logic [3:0]  rd_region;
  logic        rd_half;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rd    <= '0;
      rd_region <= '0;
      rd_half   <= 1'b0;
    end else if (host_re) begin
      rd_region <= region;
      rd_half   <= offs[0];
      reg_rd    <= '0;
      case (offs[7:0]) inside
        8'h00: reg_rd <= 32'({cav_en, bias_en});
        8'h01: reg_rd <= 32'(cap_delay);
        8'h02: reg_rd <= 32'(pulse_offset);
        8'h03: reg_rd <= 32'(b_dither);
        8'h04: reg_rd <= 32'(b_start);
        8'h05: reg_rd <= 32'(b_len);
        8'h06: reg_rd <= 32'(b_lat);
        8'h07: reg_rd <= 32'(b_kp);
        8'h08: reg_rd <= 32'(b_wrap);
        8'h09: reg_rd <= 32'(b_init);
        8'h0A: reg_rd <= 32'(dac_len);
        [8'h10:8'h1F]: if (offs[3:2] < 2'(NCAV)) begin
          case (offs[1:0])
            2'd0:    reg_rd <= 32'(c_set[offs[2+:CW]]);
            2'd1:    reg_rd <= 32'(c_kp[offs[2+:CW]]);
            2'd2:    reg_rd <= 32'(c_ki[offs[2+:CW]]);
            default: reg_rd <= 32'(c_init[offs[2+:CW]]);
          endcase
        end
        8'h20: reg_rd <= 32'(trig_cnt);
        8'h21: reg_rd <= 32'(overrun_cnt);
        8'h22: reg_rd <= 32'(timeout_cnt);
        8'h23: reg_rd <= 32'(loop_cycles);
        8'h24: reg_rd <= 32'({bias_wrapped, bias_at_min, 4'b0, bias_code});
        8'h25: reg_rd <= r_plus;
        8'h26: reg_rd <= r_zero;
        8'h27: reg_rd <= r_minus;
        8'h28: reg_rd <= 32'(sd_frames);
        8'h29: reg_rd <= 32'({adcb_rdy, adca_rdy});
        8'h2A: reg_rd <= cav_total;
        8'h2B: reg_rd <= bias_total;
        8'h2C: reg_rd <= {sd_drops, sd_waits};
        8'h2D: reg_rd <= 32'({bias_rec_wrapped, cav_rec_wrapped, sd_busy,
                               pm_play, am_play});
        [8'h30:8'h3F]: if (offs[3:2] < 2'(NCAV)) begin
          case (offs[1:0])
            2'd0:    reg_rd <= 32'(cav_phase[offs[2+:CW]]);
            2'd1:    reg_rd <= cav_amp[offs[2+:CW]][31:0];
            2'd2:    reg_rd <= 32'(rec_err);
            default: reg_rd <= 32'(cav_code[offs[2+:CW]]);
          endcase
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    case (rd_region)
      4'h0:    host_rdata = reg_rd;
      4'h2:    host_rdata = 32'(adca_rd);
      4'h3:    host_rdata = 32'(adcb_rd);
      4'h6:    host_rdata = rd_half ? cav_rd[63:32]  : cav_rd[31:0];
      4'h7:    host_rdata = rd_half ? bias_rd[63:32] : bias_rd[31:0];
      default: host_rdata = '0;
    endcase
  end

endmodule
