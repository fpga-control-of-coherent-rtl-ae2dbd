// cordic: rectangular-to-polar conversion (CORDIC in vectoring mode).
//
// Converts the dot-product result x + iy into an amplitude and a phase. The
// vector is first turned into the right half plane by an exact +-90 degree
// rotation, then ITER shift-and-add micro-rotations drive y to zero while the
// angle register accumulates atan(2^-i). The magnitude left in x carries the
// CORDIC gain (about 1.6468); it is removed by one multiplication with
// 0.60725 (39797 / 2^16).
//
// Phase units: a full turn is 2^PHASE_W, signed, so +-2^(PHASE_W-1) is
// +-180 degrees. The angle is accumulated with 4 extra fraction bits and
// rounded at the end.
//
// The rectangular-to-polar function (amplitude and phase out) follows the
// design description; the iterative one-rotation-per-cycle architecture,
// the widths and the iteration count are this design's choices.
//
// Timing: `start` in cycle 0 loads the operands; `valid` rises in cycle
// ITER+2 and `amp`/`phase` hold until the next start.
module cordic
  import cps_pkg::*;
#(
  parameter int unsigned IN_W = ACC_W,    // operand width
  parameter int unsigned PH_W = PHASE_W,  // phase output width
  parameter int unsigned ITER = 16        // micro-rotations (<= 20)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic signed [IN_W-1:0] x_in,
  input  logic signed [IN_W-1:0] y_in,
  output logic                   busy,
  output logic                   valid,
  output logic [IN_W:0]          amp,     // sqrt(x^2 + y^2)
  output logic signed [PH_W-1:0] phase    // atan2(y, x)
);

  localparam int unsigned W   = IN_W + 3;   // room for sqrt(2) * 1.65 growth
  localparam int unsigned ZF  = 4;          // extra angle fraction bits
  localparam int unsigned ZW  = PH_W + ZF + 2;
  localparam int unsigned IW  = $clog2(ITER + 1);
  localparam logic [16:0] INV_GAIN = 17'd39797;  // 0.60725 * 2^16

  // atan(2^-i) for a full turn of 2^20.
  localparam logic [19:0] ATAN20 [20] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213,
    20'd2607,   20'd1304,  20'd652,   20'd326,   20'd163,   20'd81,
    20'd41,     20'd20,    20'd10,    20'd5,     20'd3,     20'd1,
    20'd1,      20'd0};

  // Angle of micro-rotation i in the internal units (full turn 2^(PH_W+ZF)).
  function automatic logic signed [ZW-1:0] atan_step(int unsigned i);
    logic [39:0] wide;
    wide = 40'(ATAN20[i]) << (PH_W + ZF);
    return ZW'(wide >> 20);
  endfunction

  localparam logic signed [ZW-1:0] QUARTER = ZW'(1) <<< (PH_W + ZF - 2);

  logic signed [W-1:0]  xr, yr;
  logic signed [ZW-1:0] zr;
  logic [IW-1:0]        it;
  logic                 rotating, scaling;
  logic signed [W-1:0]  xs, ys;
  logic signed [ZW-1:0] zstep;
  logic [W+17-1:0]      amp_prod;

  assign xs    = xr >>> it;
  assign ys    = yr >>> it;
  assign zstep = atan_step(32'(it));
  assign busy  = rotating | scaling;

  always_ff @(posedge clk) begin
    if (rst) begin
      xr       <= '0;
      yr       <= '0;
      zr       <= '0;
      it       <= '0;
      rotating <= 1'b0;
      scaling  <= 1'b0;
      valid    <= 1'b0;
      amp      <= '0;
      phase    <= '0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        rotating <= 1'b1;
        scaling  <= 1'b0;
        it       <= '0;
        if (!x_in[IN_W-1]) begin
          xr <= W'(x_in);
          yr <= W'(y_in);
          zr <= '0;
        end else if (!y_in[IN_W-1]) begin  // second quadrant: turn by -90
          xr <= W'(y_in);
          yr <= -W'(x_in);
          zr <= QUARTER;
        end else begin                     // third quadrant: turn by +90
          xr <= -W'(y_in);
          yr <= W'(x_in);
          zr <= -QUARTER;
        end
      end else if (rotating) begin
        if (yr[W-1]) begin                 // y < 0: rotate counter-clockwise
          xr <= xr - ys;
          yr <= yr + xs;
          zr <= zr - zstep;
        end else begin
          xr <= xr + ys;
          yr <= yr - xs;
          zr <= zr + zstep;
        end
        if (it == IW'(ITER - 1)) begin
          rotating <= 1'b0;
          scaling  <= 1'b1;
        end
        it <= it + 1'b1;
      end else if (scaling) begin
        scaling <= 1'b0;
        valid   <= 1'b1;
        amp     <= (IN_W+1)'(amp_prod >> 16);
        phase   <= PH_W'((zr + (ZW'(1) <<< (ZF - 1))) >>> ZF);
      end
    end
  end

  // x is non-negative after the pre-rotation, so an unsigned product works.
  assign amp_prod = (W+17)'(unsigned'(xr)) * (W+17)'(INV_GAIN);

endmodule
