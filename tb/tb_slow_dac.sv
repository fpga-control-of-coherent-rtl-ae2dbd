// Testbench for slow_dac: two requesters post channel updates, sometimes
// together and sometimes faster than frames can go out; the AD5628 model
// must end with the latest code of every channel (the higher requester
// wins a same-channel tie), frames must match the
// AD5628 write-and-update format, and the frame/wait/drop counters must
// agree with what was posted.
`include "tb_util.svh"
module tb_slow_dac;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [1:0] req_valid;
  sdac_req_t [1:0] req;
  logic sclk, sync_n, sdin, spi_busy;
  logic [15:0] frames, waits, drops;
  logic [11:0] code [8];
  int mframes, bad_frames;
  logic [31:0] last_frame;
  logic [11:0] want [8];
  int posted = 0, ties = 0;

  slow_dac #(.NREQ(2), .DIV(1)) dut (.*);
  ad5628_model u_dac (.sclk, .sync_n, .din(sdin), .code, .frames(mframes), .bad_frames, .last_frame);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    `FINISH
  end

  task automatic post(bit a, int cha, int va, bit b, int chb, int vb);
    @(posedge clk); #1;
    req_valid = {b, a};
    req[0] = '{ch: 3'(cha), code: 12'(va)};
    req[1] = '{ch: 3'(chb), code: 12'(vb)};
    if (a) begin want[cha] = 12'(va); posted++; end
    if (b) begin want[chb] = 12'(vb); posted++; end
    if (a && b && cha == chb) ties++;
    @(posedge clk); #1 req_valid = 0;
  endtask

  task automatic drain();
    repeat (200) @(posedge clk);
  endtask

  initial begin
    req_valid = 0; req = '0;
    for (int i = 0; i < 8; i++) want[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // single request
    post(1, 0, 100, 0, 0, 0);
    drain();
    `CHECK(code[0] == 12'd100, "bias channel")
    `CHECK(last_frame == {4'h0, 4'b0011, 4'h0, 12'd100, 8'h00}, $sformatf("frame %h", last_frame))
    // both at once: both delivered, requester 0 first
    post(1, 0, 200, 1, 2, 300);
    drain();
    `CHECK(code[0] == 12'd200 && code[2] == 12'd300, "both channels")
    `CHECK(last_frame[23:20] == 4'd2, "channel 2 served after channel 0")
    `CHECK(waits >= 1, "a wait was counted")
    // burst from requester 1 faster than SPI: only the last survives
    post(0, 0, 0, 1, 1, 11);
    post(0, 0, 0, 1, 1, 12);
    post(0, 0, 0, 1, 1, 13);
    post(0, 0, 0, 1, 1, 14);
    drain();
    `CHECK(code[1] == 12'd14, $sformatf("latest code wins: %0d", code[1]))
    `CHECK(drops >= 1, "a replaced request was counted")
    // random traffic
    for (int i = 0; i < 100; i++) begin
      post(1'($urandom_range(0, 1)), 0, $urandom_range(0, 4095),
           1'($urandom_range(0, 1)), $urandom_range(0, 7), $urandom_range(0, 4095));
      repeat ($urandom_range(0, 60)) @(posedge clk);
    end
    repeat (8) drain();              // up to eight channels queued
    for (int c = 0; c < 8; c++) `CHECK(code[c] == want[c], $sformatf("channel %0d: %0d exp %0d", c, code[c], want[c]))
    `CHECK(int'(frames) == mframes, "frame counter")
    `CHECK(int'(frames) + int'(drops) == posted, $sformatf("frames %0d + drops %0d vs posted %0d", frames, drops, posted))
    `CHECK(bad_frames == 0, "no short frames")
    `FINISH
  end
endmodule
