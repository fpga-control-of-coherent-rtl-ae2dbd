// Testbench for data_buf: the delayed three-word capture, sample order in
// the 24-deep RAM, the 12-bit lane extraction and the done timing.
`include "tb_util.svh"
module tb_data_buf;
  import cps_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [15:0] delay;
  stream_t stream;
  logic busy, done;
  logic [4:0] raddr;
  samp_t rdata;
  int cyc = 0;

  data_buf dut (.*);

  always #5 clk = ~clk;

  // Stream word of cycle c: lane k carries sample 8c+k, with junk in the
  // four padding bits so that only the low 12 bits may be kept.
  function automatic stream_t word_of(int c);
    stream_t w;
    for (int k = 0; k < 8; k++) w[k*16 +: 16] = {4'hA, 12'((8*c + k) * 37)};
    return w;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
  end
  assign stream = word_of(cyc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `FINISH
  end

  task automatic run(int d);
    int s, t_done;
    @(posedge clk); #1;
    delay = 16'(d); start = 1; s = cyc;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1; end
    t_done = cyc;
    `CHECK(t_done - s == d + 4, $sformatf("done after %0d for delay %0d", t_done - s, d))
    // first captured word is the one present D+1 cycles after start
    for (int a = 0; a < 24; a++) begin
      samp_t exp;
      exp = samp_t'(12'((8*(s + d + 1) + a) * 37));
      raddr = 5'(a);
      @(posedge clk); #1;
      `CHECK(rdata == exp, $sformatf("delay %0d addr %0d: %h exp %h", d, a, rdata, exp))
    end
  endtask

  initial begin
    delay = 0; raddr = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(0);
    run(5);
    run(37);
    `FINISH
  end
endmodule
