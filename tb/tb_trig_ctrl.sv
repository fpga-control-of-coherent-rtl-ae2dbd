// Testbench for trig_ctrl: trigger synchronisation and edge timing, loop
// length measurement, overrun counting and the budget timeout.
`include "tb_util.svh"
module tb_trig_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, trig_in = 0, loop_done = 0;
  logic trig, busy, timeout;
  logic [6:0] loop_cycles;
  logic [15:0] trig_cnt, overrun_cnt, timeout_cnt;
  int cyc = 0;

  trig_ctrl #(.BUDGET(100)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    `FINISH
  end

  task automatic wait_trig(output int at);
    int start = cyc;
    while (!trig) begin
      @(posedge clk); #1;
      if (cyc - start > 20) break;
    end
    at = cyc;
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    // rising edge -> trig three cycles later
    #1 trig_in = 1; t0 = cyc;
    wait_trig(t1);
    `CHECK(t1 - t0 == 3, $sformatf("trig latency %0d", t1 - t0))
    `CHECK(busy, "busy with trig")
    // finish the loop after 20 more cycles: length 21 counted
    repeat (20) @(posedge clk);
    #1 loop_done = 1;
    @(posedge clk); #1 loop_done = 0;
    `CHECK(!busy, "idle after done")
    `CHECK(loop_cycles == 21, $sformatf("loop_cycles %0d", loop_cycles))
    `CHECK(trig_cnt == 1, "trig_cnt 1")
    // a level that stays high gives no second trigger
    repeat (10) @(posedge clk); #1;
    `CHECK(trig_cnt == 1, "no trigger on a held level")
    trig_in = 0;
    repeat (5) @(posedge clk);
    // second trigger, then an edge while busy = overrun
    #1 trig_in = 1;
    wait_trig(t1);
    `CHECK(trig_cnt == 2, "trig_cnt 2")
    #1 trig_in = 0;
    repeat (5) @(posedge clk);
    #1 trig_in = 1;
    repeat (6) @(posedge clk); #1;
    `CHECK(overrun_cnt == 1, $sformatf("overrun_cnt %0d", overrun_cnt))
    `CHECK(trig_cnt == 2, "overrun not started")
    // no done: timeout after BUDGET cycles
    wait (timeout);
    #1;
    `CHECK(timeout_cnt == 1, "timeout_cnt")
    `CHECK(loop_cycles == 100, "loop_cycles at timeout")
    @(posedge clk); #1;
    `CHECK(!busy, "idle after timeout")
    `CHECK(!timeout, "timeout is a pulse")
    `FINISH
  end
endmodule
