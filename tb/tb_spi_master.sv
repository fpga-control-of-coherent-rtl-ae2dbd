// Testbench for spi_master: random 32-bit frames are decoded by a model of
// the AD5628 serial port; the frame content, the SCLK/DIN/SYNC_n relation
// (DIN stable at falling edges) and the frame duration are checked.
`include "tb_util.svh"
module tb_spi_master;
  int checks = 0, failures = 0;
  localparam int DIV = 3;
  logic clk = 0, rst = 1, start = 0;
  logic [31:0] data;
  logic busy, done, sclk, sync_n, din;
  logic [11:0] code [8];
  int frames, bad_frames;
  logic [31:0] last_frame;
  int cyc = 0;
  logic din_q;

  spi_master #(.DIV(DIV)) dut (.*);
  ad5628_model u_dac (.sclk, .sync_n, .din, .code, .frames, .bad_frames, .last_frame);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // DIN must not change in the clock cycle of a falling SCLK edge.
  always @(posedge clk) din_q <= din;
  always @(negedge sclk) if (!sync_n) `CHECK(din == din_q, "DIN stable at falling SCLK")

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `FINISH
  end

  initial begin
    int s;
    data = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    `CHECK(sclk && sync_n, "idle levels")
    for (int i = 0; i < 20; i++) begin
      data = $urandom;
      if (i == 0) data = 32'h0312_3400;     // write 0x234 to channel 1
      @(posedge clk); #1 start = 1; s = cyc;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1; end
      `CHECK(cyc - s == (2 * 32 + 1) * DIV + 1, $sformatf("frame took %0d", cyc - s))
      `CHECK(frames == i + 1, "frame count")
      `CHECK(last_frame == data, $sformatf("frame %h exp %h", last_frame, data))
      `CHECK(sclk && sync_n, "idle after frame")
      if (i == 0) `CHECK(code[1] == 12'h234, "channel 1 written")
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    `CHECK(bad_frames == 0, "no short frames")
    `FINISH
  end
endmodule
