// data_buf: delayed capture of the pulse burst into a small dual-ported RAM.
//
// On `start` (the trigger) a down-counter waits `delay` processing-clock
// cycles, then the next three 128-bit ADC stream words are written into a
// 24 x 12-bit memory: lane k of the j-th word lands at address 8*j + k, so
// the memory holds 24 consecutive 400 MS/s samples, oldest at address 0.
// Only the 12 data bits of each 16-bit lane are kept. A second, read-only
// port with a registered output lets the dot-product engine fetch samples;
// `done` pulses in the cycle after the last write. Adjusting `delay` places
// the 13 pulses of the burst inside the 24-sample window.
//
// The 24-deep, 12-bit memory, the three-word capture and the adjustable
// delay follow the design description. The port handshake and the
// one-cycle read latency are this design's choices.
module data_buf
  import cps_pkg::*;
#(
  parameter int unsigned DEPTH   = CAP_DEPTH,  // samples captured
  parameter int unsigned DELAY_W = 16          // delay counter width
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,      // capture request (trigger)
  input  logic [DELAY_W-1:0]       delay,      // cycles from start to capture
  input  stream_t                  stream,     // ADC stream, one word per clk
  output logic                     busy,
  output logic                     done,       // capture complete
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output samp_t                    rdata       // valid one cycle after raddr
);

  localparam int unsigned WORDS = DEPTH / LANES;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned WW    = $clog2(WORDS + 1);

  samp_t             mem [DEPTH];
  logic [DELAY_W-1:0] wait_cnt;
  logic [WW-1:0]      word;
  logic               waiting, writing;

  always_ff @(posedge clk) begin
    if (rst) begin
      waiting  <= 1'b0;
      writing  <= 1'b0;
      done     <= 1'b0;
      wait_cnt <= '0;
      word     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        waiting  <= (delay != '0);
        writing  <= (delay == '0);
        wait_cnt <= delay - 1'b1;
        word     <= '0;
      end else if (waiting) begin
        if (wait_cnt == '0) begin
          waiting <= 1'b0;
          writing <= 1'b1;
        end else begin
          wait_cnt <= wait_cnt - 1'b1;
        end
      end else if (writing) begin
        word <= word + 1'b1;
        if (word == WW'(WORDS - 1)) begin
          writing <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // Write port: eight samples per cycle.
  always_ff @(posedge clk) begin
    if (writing && !start) begin
      for (int k = 0; k < LANES; k++)
        mem[AW'(word * LANES + k)] <= lane_sample(stream, k);
    end
  end

  // Read port.
  always_ff @(posedge clk) rdata <= mem[raddr];

  assign busy = waiting | writing;

endmodule
