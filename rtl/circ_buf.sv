// circ_buf: circular buffer of per-trigger records for the host.
//
// Every `we` stores one W-bit record at the write pointer, which then
// advances and wraps after DEPTH records, so the buffer always holds the
// most recent DEPTH records. `total` counts every record ever written; the
// host reads `total` and the records at (total - n) mod DEPTH to walk back
// through history without losing track of where the newest record is.
// Together with a trigger count stored inside each record this keeps the
// timing of a long recording (for example of cavity phase for a noise
// spectrum) intact. Reads are one cycle late on their own clock.
//
// Recording waveforms and register values in a circular buffer for the host
// follows the design description; the depth, record width and pointer
// reporting are this design's choices.
module circ_buf #(
  parameter int unsigned W     = 64,    // record width
  parameter int unsigned DEPTH = 1024,  // records kept
  parameter int unsigned CNT_W = 32     // width of the record counter
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [W-1:0]             din,
  output logic [$clog2(DEPTH)-1:0] wptr,    // next slot to be written
  output logic [CNT_W-1:0]         total,   // records written since reset
  output logic                     wrapped, // buffer has been filled once
  input  logic                     rclk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr    <= '0;
      total   <= '0;
      wrapped <= 1'b0;
    end else if (we) begin
      total <= total + 1'b1;
      if (wptr == AW'(DEPTH - 1)) begin
        wptr    <= '0;
        wrapped <= 1'b1;
      end else begin
        wptr <= wptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wptr] <= din;
  end

  always_ff @(posedge rclk) rdata <= mem[raddr];

endmodule
