// bias_ctrl: holds the amplitude (Mach-Zehnder) modulator at the minimum of
// its transfer function.
//
// Once per trigger three test voltages - plus, zero and minus - are added in
// turn to the modulation waveform sent to the fast DAC, each for `step_len`
// processing cycles starting `step_start` cycles after the trigger. The fast
// ADC channel watching the modulator output is summed (all eight lanes)
// during the matching three windows, delayed by `adc_lat` cycles to cover
// the DAC-optics-ADC path. At the minimum the plus and minus readings are
// equal and the zero reading is the lowest of the three, so the difference
// R+ - R- is the error signal and a proportional step moves the bias:
//     bias <- bias - (kp * (R+ - R-)) >>> KP_SHIFT
// The bias is the code of one slow-DAC channel. When a step would leave the
// DAC range the code is moved by `wrap_step` (one period of the transfer
// function in DAC codes) back into range: the next minimum is an equally
// good operating point (modulo reset). `at_min` reports whether the zero
// reading was below both others.
//
// The three-step dither, the readings, the equal plus/minus criterion, the
// proportional-only control and the modulo reset at the DAC limit follow the
// design description. Window placement, summing, the gain format and the
// saturating 16-bit add into the DAC stream are this design's choices.
//
// Timing: the window clock t is 0 in the cycle after `trig`; the plus step
// covers t = step_start .. step_start+step_len-1, the zero and minus steps
// follow, and the ADC windows are the same shifted by adc_lat. `update`
// (with `done` and the new `bias_code`) is high at
// t = step_start + adc_lat + 3*step_len + 2.
module bias_ctrl
  import cps_pkg::*;
#(
  parameter int unsigned KP_SHIFT = 16,    // gain fraction bits
  parameter int unsigned T_W      = 18     // trigger-relative time counter
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                enable,
  input  logic                trig,
  input  logic signed [15:0]  dither,      // test step, fast-DAC codes
  input  logic [15:0]         step_start,  // cycles from trig to plus step
  input  logic [15:0]         step_len,    // cycles per step (>0)
  input  logic [7:0]          adc_lat,     // DAC-to-ADC latency, cycles
  input  logic signed [15:0]  kp,
  input  sdac_t               wrap_step,   // DAC codes per transfer period
  input  sdac_t               init_code,   // bias while disabled
  input  stream_t             dac_in,      // modulation waveform
  output stream_t             dac_out,     // waveform + test step
  input  stream_t             adc,         // modulator photodiode
  output sdac_t               bias_code,
  output logic                update,      // new bias_code
  output logic                done,
  output logic                wrapped,     // last update was a modulo reset
  output logic                at_min,      // zero reading lowest
  output acc_t                r_plus,
  output acc_t                r_zero,
  output acc_t                r_minus
);

  typedef enum logic [1:0] {W_NONE, W_PLUS, W_ZERO, W_MINUS} win_t;

  localparam int unsigned EW = ACC_W + 1;          // R+ - R-
  localparam int unsigned MW = EW + 16;            // kp * err
  localparam int unsigned BW = MW + 2;             // bias arithmetic

  logic [T_W-1:0] t;
  logic           running, calc1, calc2;
  logic [T_W-1:0] d_begin, a_begin, len;
  win_t           dac_win, adc_win;
  logic signed [15:0]    step_v;
  acc_t                  lane_sum;
  logic signed [MW-1:0]  prod;
  logic signed [BW-1:0]  cand;

  assign len     = T_W'(step_len);
  assign d_begin = T_W'(step_start);
  assign a_begin = T_W'(step_start) + T_W'(adc_lat);

  function automatic win_t window(logic [T_W-1:0] now, logic [T_W-1:0] b,
                                  logic [T_W-1:0] l);
    if (now < b)               return W_NONE;
    else if (now < b + l)      return W_PLUS;
    else if (now < b + 2 * l)  return W_ZERO;
    else if (now < b + 3 * l)  return W_MINUS;
    else                       return W_NONE;
  endfunction

  always_comb begin
    dac_win = running ? window(t, d_begin, len) : W_NONE;
    adc_win = running ? window(t, a_begin, len) : W_NONE;
    case (dac_win)
      W_PLUS:  step_v = dither;
      W_MINUS: step_v = -dither;
      default: step_v = '0;
    endcase
  end

  // Test step added to every lane, saturating at the 16-bit DAC limits.
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      logic signed [16:0] s;
      s = 17'(signed'(dac_in[k*LANE_W +: LANE_W])) + 17'(step_v);
      if (s > 17'sd32767)       dac_out[k*LANE_W +: LANE_W] = 16'h7fff;
      else if (s < -17'sd32768) dac_out[k*LANE_W +: LANE_W] = 16'h8000;
      else                      dac_out[k*LANE_W +: LANE_W] = s[15:0];
    end
  end

  always_comb begin
    lane_sum = '0;
    for (int k = 0; k < LANES; k++)
      lane_sum = lane_sum + ACC_W'(lane_sample(adc, k));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t       <= '0;
      running <= 1'b0;
      calc1   <= 1'b0;
      calc2   <= 1'b0;
      r_plus  <= '0;
      r_zero  <= '0;
      r_minus <= '0;
    end else begin
      calc1 <= 1'b0;
      calc2 <= calc1;
      if (trig && enable) begin
        running <= 1'b1;
        t       <= '0;
        r_plus  <= '0;
        r_zero  <= '0;
        r_minus <= '0;
      end else if (running) begin
        t <= t + 1'b1;
        case (adc_win)
          W_PLUS:  r_plus  <= r_plus + lane_sum;
          W_ZERO:  r_zero  <= r_zero + lane_sum;
          W_MINUS: r_minus <= r_minus + lane_sum;
          default: ;
        endcase
        if (t == a_begin + 3 * len - 1'b1) begin
          running <= 1'b0;
          calc1   <= 1'b1;
        end
      end
    end
  end

  // Proportional step with modulo reset.
  always_ff @(posedge clk) begin
    if (rst) prod <= '0;
    else if (calc1) prod <= MW'(kp) * MW'(EW'(r_plus) - EW'(r_minus));
  end

  assign cand = BW'(signed'({1'b0, bias_code})) - BW'(prod >>> KP_SHIFT);

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      bias_code <= init_code;
      update    <= 1'b0;
      done      <= 1'b0;
      wrapped   <= 1'b0;
      at_min    <= 1'b0;
    end else begin
      update <= calc2;
      done   <= calc2;
      if (calc2) begin
        at_min <= (r_zero < r_plus) && (r_zero < r_minus);
        if (cand > BW'((1 << SDAC_W) - 1)) begin
          bias_code <= SDAC_W'(cand - BW'(wrap_step));
          wrapped   <= 1'b1;
        end else if (cand < 0) begin
          bias_code <= SDAC_W'(cand + BW'(wrap_step));
          wrapped   <= 1'b1;
        end else begin
          bias_code <= SDAC_W'(cand);
          wrapped   <= 1'b0;
        end
      end
    end
  end

endmodule
