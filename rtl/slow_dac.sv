// slow_dac: shares the AD5628 octal slow DAC between its users.
//
// The bias loop and the cavity loop post update requests (channel and
// 12-bit code). Each of the eight DAC channels has a one-deep slot: a
// request fills the slot of its channel, and a newer request for the same
// channel replaces an unsent one, since only the latest code of a channel
// matters. Whenever the SPI master is idle the lowest-numbered waiting
// channel is sent as an AD5628 "write to and update channel n" frame:
//     [31:28] 0  [27:24] command 0011  [23:20] channel  [19:8] code  [7:0] 0
// `frames` counts frames sent, `waits` counts requests that could not go
// out at once (SPI busy, another channel waiting or another request in the
// same cycle), `drops` counts replaced requests.
//
// Updating the bias and PZT voltages through slow-DAC channels over SPI
// follows the design description; the frame layout is the AD5628's, and the
// per-channel slots, the replacement policy and the counters are this
// design's choices. If two requesters post the same channel in one cycle,
// the higher-numbered one is kept.
//
// Timing: a request is accepted in the cycle it is posted; its frame starts
// one cycle after its channel wins (two after posting if the SPI master is
// idle and no other channel waits).
module slow_dac
  import cps_pkg::*;
#(
  parameter int unsigned NREQ  = 2,   // requesters
  parameter int unsigned DIV   = 2,   // SPI clock divider
  parameter int unsigned CNT_W = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic      [NREQ-1:0]  req_valid,
  input  sdac_req_t [NREQ-1:0]  req,
  output logic                  sclk,
  output logic                  sync_n,
  output logic                  sdin,
  output logic                  spi_busy,
  output logic [CNT_W-1:0]      frames,
  output logic [CNT_W-1:0]      waits,
  output logic [CNT_W-1:0]      drops
);

  localparam int unsigned NCH = 1 << SDAC_CH_W;

  logic  [NCH-1:0]       pend;
  sdac_t [NCH-1:0]       slot;
  logic                  start, send;
  logic [31:0]           frame;
  logic [SDAC_CH_W-1:0]  win;
  logic                  any;
  logic [NCH-1:0]        posted;
  logic [CNT_W-1:0]      n_wait, n_drop;

  always_comb begin
    any = 1'b0;
    win = '0;
    for (int i = NCH - 1; i >= 0; i--) begin
      if (pend[i]) begin
        any = 1'b1;
        win = SDAC_CH_W'(i);
      end
    end
  end

  assign send = any && !spi_busy && !start;

  // Per-cycle request bookkeeping.
  always_comb begin
    posted = '0;
    n_wait = '0;
    n_drop = '0;
    for (int i = 0; i < NREQ; i++) begin
      if (req_valid[i]) begin
        if (posted[req[i].ch] ||
            (pend[req[i].ch] && !(send && win == req[i].ch)))
          n_drop = n_drop + 1'b1;
        else if (spi_busy || start || any ||
                 (req_valid & ~(NREQ'(1) << i)) != '0)
          n_wait = n_wait + 1'b1;
        posted[req[i].ch] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend   <= '0;
      slot   <= '0;
      start  <= 1'b0;
      frame  <= '0;
      frames <= '0;
      waits  <= '0;
      drops  <= '0;
    end else begin
      start <= 1'b0;
      if (send) begin
        start     <= 1'b1;
        frame     <= {4'b0000, AD5628_CMD_WRITE_UPDATE, 4'(win), slot[win],
                      8'h00};
        pend[win] <= 1'b0;
        frames    <= frames + 1'b1;
      end
      for (int i = 0; i < NREQ; i++) begin
        if (req_valid[i]) begin
          slot[req[i].ch] <= req[i].code;
          pend[req[i].ch] <= 1'b1;
        end
      end
      waits <= waits + n_wait;
      drops <= drops + n_drop;
    end
  end

  spi_master #(.BITS(32), .DIV(DIV)) u_spi (
    .clk, .rst, .start, .data(frame), .busy(spi_busy), .done(),
    .sclk, .sync_n, .din(sdin)
  );

endmodule
