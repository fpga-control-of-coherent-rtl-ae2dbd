// Testbench for dac_buf: single-sample writes, 1-to-8 packing, playback of
// `len` words after a trigger, the idle code around it and its timing.
`include "tb_util.svh"
module tb_dac_buf;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  localparam int WORDS = 16;
  logic wclk = 0, we = 0, rclk, rst = 1, trig = 0;
  logic [6:0] waddr;
  logic [15:0] wdata;
  logic [4:0] len;
  stream_t dout;
  logic playing;
  logic [15:0] img [WORDS*8];

  dac_buf #(.WORDS(WORDS)) dut (.*);

  always #5 wclk = ~wclk;
  assign rclk = wclk;

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    `FINISH
  end

  task automatic play(int l);
    int lc;
    lc = (l > WORDS) ? WORDS : l;
    @(posedge rclk); #1 len = 5'(l); trig = 1;
    @(posedge rclk); #1 trig = 0;              // cycle 1
    `CHECK(!playing && dout == '0, "idle in cycle 1")
    for (int w = 0; w < lc; w++) begin
      @(posedge rclk); #1;                     // cycle 2 + w
      `CHECK(playing, $sformatf("playing word %0d", w))
      for (int k = 0; k < 8; k++)
        `CHECK(dout[k*16 +: 16] == img[8*w + k], $sformatf("word %0d lane %0d", w, k))
    end
    @(posedge rclk); #1;
    `CHECK(!playing && dout == '0, "idle after playback")
  endtask

  initial begin
    waddr = 0; wdata = 0; len = 0;
    repeat (3) @(posedge wclk);
    #1 rst = 0;
    for (int s = 0; s < WORDS * 8; s++) begin
      img[s] = 16'($urandom);
      @(posedge wclk); #1 we = 1; waddr = 7'(s); wdata = img[s];
    end
    @(posedge wclk); #1 we = 0;
    play(4);
    play(1);
    play(16);
    // rewrite one sample and replay
    img[9] = 16'h1234;
    @(posedge wclk); #1 we = 1; waddr = 7'd9; wdata = 16'h1234;
    @(posedge wclk); #1 we = 0;
    play(3);
    `FINISH
  end
endmodule
