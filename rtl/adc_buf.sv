// adc_buf: 8-to-1 dual-ported RAM that hands fast-ADC waveforms to the host.
//
// The write side runs on the processing clock and takes one 128-bit stream
// word (eight 16-bit ADC lanes) per cycle. After the host arms it (`arm`),
// the next trigger starts a capture of WORDS consecutive words; `ready` then
// rises and stays high until the next arm. The read side, on its own clock,
// addresses single 16-bit samples: sample s is lane s mod 8 of word s / 8, so
// the host sees the waveform in sampling order at one eighth of the width.
// Arming before each snapshot keeps a waveform stable while it is read.
//
// The 8-to-1 width conversion on a dual-ported RAM between the fast data and
// the host side follows the design description. The depth, the arm/trigger
// capture discipline and the one-cycle read latency are this design's
// choices.
//
// Timing: `trig` in cycle 0 (while armed) writes words from cycle 1 to
// cycle WORDS; `ready` is high from cycle WORDS+1. `rdata` follows `raddr`
// by one read-clock cycle.
module adc_buf
  import cps_pkg::*;
#(
  parameter int unsigned WORDS = 256    // 128-bit words per snapshot
) (
  // write side (processing clock)
  input  logic                            wclk,
  input  logic                            rst,
  input  logic                            arm,
  input  logic                            trig,
  input  stream_t                         din,
  output logic                            ready,    // snapshot complete
  output logic                            capturing,
  // read side (host clock)
  input  logic                            rclk,
  input  logic [$clog2(WORDS*LANES)-1:0]  raddr,    // sample index
  output logic [LANE_W-1:0]               rdata
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned LW = $clog2(LANES);

  logic [LANES-1:0][LANE_W-1:0] mem [WORDS];
  logic [AW-1:0] waddr;
  logic          armed;

  always_ff @(posedge wclk) begin
    if (rst) begin
      armed     <= 1'b0;
      capturing <= 1'b0;
      ready     <= 1'b0;
      waddr     <= '0;
    end else begin
      if (arm) begin
        armed <= 1'b1;
        ready <= 1'b0;
      end else if (trig && armed && !capturing) begin
        armed     <= 1'b0;
        capturing <= 1'b1;
        waddr     <= '0;
      end else if (capturing) begin
        waddr <= waddr + 1'b1;
        if (waddr == AW'(WORDS - 1)) begin
          capturing <= 1'b0;
          ready     <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (capturing) mem[waddr] <= din;
  end

  // 8-to-1 read: word select by the upper bits, lane by the lower bits.
  always_ff @(posedge rclk) begin
    rdata <= mem[raddr[LW +: AW]][raddr[LW-1:0]];
  end

endmodule
