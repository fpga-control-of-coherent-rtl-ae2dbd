// Testbench for adc_buf: arm-then-trigger capture, the 8-to-1 sample order
// on the read side, the ready timing, and that an unarmed trigger and a
// running stream leave a finished snapshot untouched.
`include "tb_util.svh"
module tb_adc_buf;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  localparam int WORDS = 16;
  logic wclk = 0, rst = 1, arm = 0, trig = 0;
  stream_t din;
  logic ready, capturing;
  logic rclk;
  logic [6:0] raddr;
  logic [15:0] rdata;
  int cyc = 0;

  adc_buf #(.WORDS(WORDS)) dut (.*);

  always #5 wclk = ~wclk;
  assign rclk = wclk;
  always @(posedge wclk) cyc <= cyc + 1;
  always_comb for (int k = 0; k < 8; k++) din[k*16 +: 16] = 16'((8 * cyc + k) * 7 + 3);

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    `FINISH
  end

  task automatic snapshot(input bit do_arm, output int base);
    int s;
    if (do_arm) begin @(posedge wclk); #1 arm = 1; @(posedge wclk); #1 arm = 0; end
    repeat (3) @(posedge wclk);
    #1 trig = 1; s = cyc;
    @(posedge wclk); #1 trig = 0;
    base = s + 1;
    if (do_arm) begin
      while (!ready) begin @(posedge wclk); #1; end
      `CHECK(cyc - s == WORDS + 1, $sformatf("ready after %0d", cyc - s))
    end else begin
      repeat (WORDS + 3) @(posedge wclk); #1;
    end
  endtask

  task automatic readback(int base);
    for (int a = 0; a < WORDS * 8; a++) begin
      raddr = 7'(a);
      @(posedge rclk); #1;
      `CHECK(rdata == 16'((8 * base + a) * 7 + 3), $sformatf("sample %0d: %h", a, rdata))
    end
  endtask

  initial begin
    int b1, b2;
    raddr = 0;
    repeat (3) @(posedge wclk);
    #1 rst = 0;
    `CHECK(!ready, "not ready after reset")
    snapshot(1, b1);
    readback(b1);
    snapshot(0, b2);             // not armed: old snapshot stays
    `CHECK(ready, "still ready")
    readback(b1);
    snapshot(1, b2);
    readback(b2);
    `FINISH
  end
endmodule
