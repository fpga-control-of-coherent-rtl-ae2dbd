// dac_buf: 1-to-8 dual-ported RAM that plays a host-written waveform into
// the fast DAC.
//
// The host writes 16-bit DAC samples one at a time on its own clock; sample
// s goes to lane s mod 8 of word s / 8. On the processing clock a trigger
// starts playback of `len` words (eight samples each, one word per cycle)
// from word 0. Outside playback the output is the idle code 0 (no drive on
// the modulator). This is how the amplitude modulator is given its pulse-
// burst pattern and the phase modulator its phase steps once per trigger.
//
// The 1-to-8 width conversion on a dual-ported RAM from host to fast DAC
// follows the design description. The playback discipline, idle code and
// depth are this design's choices.
//
// Timing: `trig` in cycle 0; `dout` carries word 0 in cycle 2 and word
// len-1 in cycle len+1 (one cycle for the address, one for the RAM read);
// `playing` marks the same cycles. len = 0 plays nothing; len is capped at
// WORDS.
module dac_buf
  import cps_pkg::*;
#(
  parameter int unsigned WORDS = 256    // 128-bit words of waveform
) (
  // write side (host clock)
  input  logic                            wclk,
  input  logic                            we,
  input  logic [$clog2(WORDS*LANES)-1:0]  waddr,    // sample index
  input  logic [LANE_W-1:0]               wdata,
  // read side (processing clock)
  input  logic                            rclk,
  input  logic                            rst,
  input  logic                            trig,
  input  logic [$clog2(WORDS+1)-1:0]      len,      // words to play
  output stream_t                         dout,
  output logic                            playing
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned LW = $clog2(LANES);
  localparam int unsigned NW = $clog2(WORDS + 1);

  logic [LANES-1:0][LANE_W-1:0] mem [WORDS];
  logic [AW-1:0] raddr;
  logic [NW-1:0] left;
  logic          rd_en;

  always_ff @(posedge wclk) begin
    if (we) mem[waddr[LW +: AW]][waddr[LW-1:0]] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (rst) begin
      rd_en   <= 1'b0;
      left    <= '0;
      raddr   <= '0;
      playing <= 1'b0;
      dout    <= '0;
    end else begin
      if (trig) begin
        raddr <= '0;
        left  <= (len > NW'(WORDS)) ? NW'(WORDS) : len;
        rd_en <= (len != '0);
      end else if (rd_en) begin
        raddr <= raddr + 1'b1;
        left  <= left - 1'b1;
        if (left == NW'(1)) rd_en <= 1'b0;
      end
      playing <= rd_en && !trig;
      dout    <= (rd_en && !trig) ? stream_t'(mem[raddr]) : '0;
    end
  end

endmodule
