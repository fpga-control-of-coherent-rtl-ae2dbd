// cavity_ctrl: locks the round-trip phase of NCAV stacking cavities, one
// cavity per trigger in turn.
//
// All cavities share one fast-ADC channel through an analog switch. Each
// trigger serves the cavity the switch currently selects:
//   1. data_buf waits `cap_delay` cycles and captures 24 samples;
//   2. dot_product multiplies the 13 pulse samples starting at
//      `pulse_offset` with that cavity's calibrated complex vector;
//   3. cordic turns x + iy into amplitude and phase;
//   4. that cavity's pi_ctrl compares the phase with its intended phase and
//      computes a new PZT code, which is posted to the slow DAC on channel
//      CH0 + cavity;
//   5. a record (cavity, phase, error, code) is emitted for the circular
//      buffer, `done` pulses and the switch moves to the next cavity, so it
//      has a whole trigger period to settle before the next measurement.
// `abort` (loop over budget) returns the sequencer to idle.
//
// The processing chain, the per-cavity intended phase, the shared ADC with
// an analog switch and the alternating service of the cavities follow the
// design description. Storage of the calibrated vectors in registers, the
// coefficient write port, the switch timing and channel numbering are this
// design's choices.
//
// Coefficient write address: {cavity, pulse index k (0..12), imaginary}.
// Timing: `done` follows `trig` after cap_delay + 4 (capture) + 15 (dot
// product) + 18 (CORDIC) + 2 (PI) + 1 cycles.
module cavity_ctrl
  import cps_pkg::*;
#(
  parameter int unsigned NCAV = 2,        // cavities served in turn
  parameter int unsigned CH0  = 1,        // slow-DAC channel of cavity 0
  parameter int unsigned ITER = 16        // CORDIC iterations
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     trig,
  input  logic                     abort,
  input  stream_t                  adc,           // switched photodiodes
  // configuration
  input  logic [NCAV-1:0]          enable,
  input  logic [15:0]              cap_delay,
  input  logic [4:0]               pulse_offset,
  input  phase_t [NCAV-1:0]        setpoint,
  input  logic [NCAV-1:0][15:0]    kp,
  input  logic [NCAV-1:0][15:0]    ki,
  input  sdac_t [NCAV-1:0]         init_code,
  input  logic                     coef_we,
  input  logic [$clog2(NCAV)+$clog2(NPULSE)+1-1:0] coef_addr,
  input  coef_t                    coef_wdata,
  // outputs
  output logic [$clog2(NCAV)-1:0]  sw_sel,        // analog switch select
  output logic                     sdac_valid,
  output sdac_req_t                sdac_req,
  output logic                     done,
  output logic [$clog2(NCAV)-1:0]  rec_cav,       // with done
  output phase_t                   rec_phase,
  output phase_t                   rec_err,
  output sdac_t                    rec_code,
  output logic [ACC_W:0]           rec_amp,
  output logic                     rec_sat,
  output phase_t [NCAV-1:0]        phase_out,     // last phase per cavity
  output sdac_t  [NCAV-1:0]        code_out       // last code per cavity
);

  localparam int unsigned CW = $clog2(NCAV);
  localparam int unsigned KW = $clog2(NPULSE);

  typedef enum logic [2:0] {S_IDLE, S_CAPT, S_DOT, S_CORD, S_PI} state_t;

  state_t        state;
  logic [CW-1:0] cur;

  // Calibrated vectors.
  coef_t [NCAV-1:0][NPULSE-1:0] ca, cb;

  always_ff @(posedge clk) begin
    if (rst) begin
      ca <= '0;
      cb <= '0;
    end else if (coef_we) begin
      if (coef_addr[0]) cb[coef_addr[1+KW +: CW]][coef_addr[1 +: KW]] <= coef_wdata;
      else              ca[coef_addr[1+KW +: CW]][coef_addr[1 +: KW]] <= coef_wdata;
    end
  end

  // Datapath.
  logic                         cap_done, dp_valid, cd_valid;
  logic [$clog2(CAP_DEPTH)-1:0] raddr;
  samp_t                        rdata;
  acc_t                         dx, dy;
  logic [ACC_W:0]               amp;
  phase_t                       phase;

  data_buf u_buf (
    .clk, .rst, .start(trig && state == S_IDLE), .delay(cap_delay),
    .stream(adc), .busy(), .done(cap_done), .raddr, .rdata
  );

  dot_product u_dot (
    .clk, .rst, .start(cap_done && state == S_CAPT), .offset(pulse_offset),
    .coef_a(ca[cur]), .coef_b(cb[cur]), .raddr, .rdata,
    .busy(), .valid(dp_valid), .x(dx), .y(dy)
  );

  cordic #(.ITER(ITER)) u_cordic (
    .clk, .rst, .start(dp_valid && state == S_DOT), .x_in(dx), .y_in(dy),
    .busy(), .valid(cd_valid), .amp, .phase
  );

  logic [NCAV-1:0] pi_valid;
  phase_t [NCAV-1:0] pi_err;
  sdac_t  [NCAV-1:0] pi_code;
  logic   [NCAV-1:0] pi_sat;

  for (genvar c = 0; c < NCAV; c++) begin : g_pi
    pi_ctrl u_pi (
      .clk, .rst, .enable(enable[c]), .setpoint(setpoint[c]),
      .kp(kp[c]), .ki(ki[c]), .init_code(init_code[c]),
      .valid_in(cd_valid && state == S_CORD && cur == CW'(c)), .phase,
      .valid_out(pi_valid[c]), .err(pi_err[c]), .code(pi_code[c]),
      .sat(pi_sat[c])
    );
  end

  // Sequencer.
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cur        <= '0;
      sw_sel     <= '0;
      done       <= 1'b0;
      sdac_valid <= 1'b0;
      sdac_req   <= '0;
      rec_cav    <= '0;
      rec_phase  <= '0;
      rec_err    <= '0;
      rec_code   <= '0;
      rec_amp    <= '0;
      rec_sat    <= 1'b0;
      phase_out  <= '0;
      code_out   <= '0;
    end else begin
      done       <= 1'b0;
      sdac_valid <= 1'b0;
      if (abort) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (trig) begin
            state <= S_CAPT;
            cur   <= sw_sel;
          end
          S_CAPT: if (cap_done) state <= S_DOT;
          S_DOT:  if (dp_valid) state <= S_CORD;
          S_CORD: if (cd_valid) begin
            state          <= S_PI;
            rec_amp        <= amp;
            phase_out[cur] <= phase;
          end
          S_PI: if (pi_valid[cur]) begin
            state         <= S_IDLE;
            done          <= 1'b1;
            sdac_valid    <= 1'b1;
            sdac_req.ch   <= SDAC_CH_W'(CH0 + cur);
            sdac_req.code <= pi_code[cur];
            rec_cav       <= cur;
            rec_phase     <= phase_out[cur];
            rec_err       <= pi_err[cur];
            rec_code      <= pi_code[cur];
            rec_sat       <= pi_sat[cur];
            code_out[cur] <= pi_code[cur];
            sw_sel        <= (cur == CW'(NCAV - 1)) ? '0 : cur + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
