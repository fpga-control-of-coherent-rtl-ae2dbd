// trig_ctrl: trigger front end and loop-time watchdog of the feedback loop.
//
// The kHz trigger, derived from the laser master clock, starts one feedback
// iteration on its rising edge. The input is brought into the 50 MHz
// processing domain by a two-flop synchroniser and its rising edge becomes a
// one-cycle `trig` pulse. A clock counter then runs until the feedback loop
// reports `loop_done`; the count is latched in `loop_cycles` so that firmware
// can check the loop meets its timing. If the count reaches BUDGET before the
// loop ends, `timeout` pulses (the loop is aborted and the event counted). A
// trigger edge that arrives while a loop is still running is not started; it
// is counted in `overrun_cnt`.
//
// The trigger edge, the counter and the requirement that the loop ends
// before the next trigger follow the design description. The budget of one
// trigger period (50 MHz / 1 kHz = 50000 cycles), the drop-and-count policy
// and the counter widths are this design's choices.
//
// Timing: `trig` is high three cycles after the input rises (two synchroniser
// flops plus the edge flop). `loop_cycles` counts from the `trig` cycle to the
// `loop_done` cycle, both included.
module trig_ctrl #(
  parameter int unsigned BUDGET = 50000,   // cycles per trigger period
  parameter int unsigned CNT_W  = 16       // event counter width
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        trig_in,     // asynchronous kHz trigger
  input  logic                        loop_done,   // feedback loop finished
  output logic                        trig,        // start of one iteration
  output logic                        busy,        // loop in progress
  output logic                        timeout,     // budget exceeded, abort
  output logic [$clog2(BUDGET+1)-1:0] loop_cycles, // last loop length
  output logic [CNT_W-1:0]            trig_cnt,    // iterations started
  output logic [CNT_W-1:0]            overrun_cnt, // triggers while busy
  output logic [CNT_W-1:0]            timeout_cnt  // loops aborted
);

  localparam int unsigned TW = $clog2(BUDGET+1);

  logic [2:0]    sync;
  logic          edge_det;
  logic [TW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], trig_in};
  end

  assign edge_det = sync[1] & ~sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      trig        <= 1'b0;
      busy        <= 1'b0;
      timeout     <= 1'b0;
      count       <= '0;
      loop_cycles <= '0;
      trig_cnt    <= '0;
      overrun_cnt <= '0;
      timeout_cnt <= '0;
    end else begin
      trig    <= 1'b0;
      timeout <= 1'b0;
      if (busy) begin
        if (loop_done) begin
          busy        <= 1'b0;
          loop_cycles <= count + 1'b1;
        end else if (count == TW'(BUDGET - 1)) begin
          busy        <= 1'b0;
          timeout     <= 1'b1;
          loop_cycles <= TW'(BUDGET);
          timeout_cnt <= timeout_cnt + 1'b1;
        end else begin
          count <= count + 1'b1;
        end
        if (edge_det) overrun_cnt <= overrun_cnt + 1'b1;
      end else if (edge_det) begin
        trig     <= 1'b1;
        busy     <= 1'b1;
        count    <= '0;
        trig_cnt <= trig_cnt + 1'b1;
      end
    end
  end

  // busy rises with trig: the count starts in the trig cycle.
  assert property (@(posedge clk) disable iff (rst) trig |-> busy);

endmodule
