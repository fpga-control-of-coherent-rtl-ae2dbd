// pi_ctrl: proportional-integral loop from cavity phase to PZT drive code.
//
// Each measured phase is subtracted from the intended phase; the difference
// wraps modulo one turn, so the error is always the short way round. The
// integrator adds ki * error and is clamped to the DAC range (anti-windup);
// the output is integrator + kp * error, shifted down by FRAC bits and
// clamped to the slow-DAC range 0 .. 2^DAC_W-1. While `enable` is low the
// integrator is held at `init_code`, so enabling the loop starts from that
// PZT position without a jump.
//
// The phase-error subtraction (intended minus measured) and the PI law
// driving the PZT follow the design description. Gains, fixed-point format,
// clamping and the init behaviour are this design's choices.
//
// Timing: `valid_in` in cycle 0, `valid_out` with `code`, `err` and `sat` in
// cycle 2.
module pi_ctrl
  import cps_pkg::*;
#(
  parameter int unsigned DAC_W = SDAC_W,  // PZT DAC resolution
  parameter int unsigned GAIN_W = 16,     // kp, ki width (signed)
  parameter int unsigned FRAC  = 16       // integrator fraction bits
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable,
  input  phase_t                   setpoint,   // intended phase
  input  logic signed [GAIN_W-1:0] kp,
  input  logic signed [GAIN_W-1:0] ki,
  input  logic [DAC_W-1:0]         init_code,  // PZT code while disabled
  input  logic                     valid_in,
  input  phase_t                   phase,      // measured phase
  output logic                     valid_out,
  output phase_t                   err,        // setpoint - phase
  output logic [DAC_W-1:0]         code,       // PZT DAC code
  output logic                     sat         // output was clamped
);

  localparam int unsigned PW = PHASE_W + GAIN_W;      // product width
  localparam int unsigned IW = PW + 2;                // integrator width
  localparam logic signed [IW-1:0] IMAX =
      IW'(((1 << DAC_W) - 1)) <<< FRAC;

  logic                 v1;
  logic signed [PW-1:0] p_term, i_term;
  logic signed [IW-1:0] integ, integ_sum, integ_next, u;
  logic signed [IW-FRAC-1:0] u_code;

  // Error wraps modulo one turn: it is formed at the phase width.
  phase_t e;
  assign e = setpoint - phase;

  // Stage 1: error and products.
  always_ff @(posedge clk) begin
    if (rst) begin
      v1     <= 1'b0;
      err    <= '0;
      p_term <= '0;
      i_term <= '0;
    end else begin
      v1 <= valid_in;
      if (valid_in) begin
        err    <= e;
        p_term <= kp * e;
        i_term <= ki * e;
      end
    end
  end

  // Stage 2: clamped integrator and output.
  always_comb begin
    integ_sum = integ + IW'(i_term);
    if (integ_sum < 0)         integ_next = '0;
    else if (integ_sum > IMAX) integ_next = IMAX;
    else                       integ_next = integ_sum;
    u      = integ_next + IW'(p_term);
    u_code = u[IW-1:FRAC];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ     <= IW'(init_code) <<< FRAC;
      code      <= init_code;
      sat       <= 1'b0;
      valid_out <= 1'b0;
    end else if (!enable) begin
      integ     <= IW'(init_code) <<< FRAC;
      code      <= init_code;
      sat       <= 1'b0;
      valid_out <= v1;
    end else begin
      valid_out <= v1;
      if (v1) begin
        integ <= integ_next;
        if (u_code < 0) begin
          code <= '0;
          sat  <= 1'b1;
        end else if (u_code > (IW-FRAC)'((1 << DAC_W) - 1)) begin
          code <= '1;
          sat  <= 1'b1;
        end else begin
          code <= DAC_W'(u_code);
          sat  <= 1'b0;
        end
      end
    end
  end

endmodule
