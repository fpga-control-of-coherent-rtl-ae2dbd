// dot_product: projects the measured pulse train onto a calibrated complex
// vector.
//
// The burst of NPULSE optical pulses is read sample by sample from the
// capture RAM (addresses offset .. offset+NPULSE-1) and multiplied by the
// calibrated vector a_k + i*b_k:
//     x = sum_k p_k * a_k,   y = sum_k p_k * b_k
// so that x + iy is a complex number whose angle approximates the cavity
// round-trip phase. One multiply-accumulate per vector component is done per
// cycle, so a result needs NPULSE cycles of reading.
//
// The 13-long real measurement vector, the complex calibrated vector and the
// x + iy result follow the design description. The sequential one-sample-
// per-cycle schedule, the 16-bit coefficients and the 32-bit sums are this
// design's choices.
//
// Timing: `start` in cycle 0, read addresses in cycles 1..NPULSE, `valid`
// (with `x`, `y`) in cycle NPULSE+2. `x` and `y` hold until the next start.
module dot_product
  import cps_pkg::*;
#(
  parameter int unsigned N     = NPULSE,    // vector length
  parameter int unsigned DEPTH = CAP_DEPTH  // capture RAM depth
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [$clog2(DEPTH)-1:0] offset,  // address of pulse 1
  input  coef_t [N-1:0]            coef_a,  // real parts a_k
  input  coef_t [N-1:0]            coef_b,  // imaginary parts b_k
  output logic [$clog2(DEPTH)-1:0] raddr,   // to the capture RAM
  input  samp_t                    rdata,   // one cycle after raddr
  output logic                     busy,
  output logic                     valid,
  output acc_t                     x,
  output acc_t                     y
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned KW = $clog2(N);

  logic          issuing, pipe_v;
  logic [KW-1:0] idx, pipe_k;

  // Full-precision products (12 x 16 bits).
  logic signed [SAMP_W+COEF_W-1:0] prod_a, prod_b;
  assign prod_a = rdata * coef_a[pipe_k];
  assign prod_b = rdata * coef_b[pipe_k];

  assign raddr = offset + AW'(idx);
  assign busy  = issuing | pipe_v;

  always_ff @(posedge clk) begin
    if (rst) begin
      issuing <= 1'b0;
      pipe_v  <= 1'b0;
      valid   <= 1'b0;
      idx     <= '0;
      pipe_k  <= '0;
      x       <= '0;
      y       <= '0;
    end else begin
      valid  <= 1'b0;
      pipe_v <= issuing;
      pipe_k <= idx;
      if (start) begin
        issuing <= 1'b1;
        idx     <= '0;
        pipe_v  <= 1'b0;
        x       <= '0;
        y       <= '0;
      end else begin
        if (issuing) begin
          if (idx == KW'(N - 1)) issuing <= 1'b0;
          else                   idx     <= idx + 1'b1;
        end
        if (pipe_v) begin
          x <= x + ACC_W'(prod_a);
          y <= y + ACC_W'(prod_b);
          if (pipe_k == KW'(N - 1)) valid <= 1'b1;
        end
      end
    end
  end

endmodule
