// spi_master: shifts one 32-bit frame into the AD5628 slow DAC.
//
// A frame starts with SYNC_n falling while SCLK is high and the first (most
// significant) data bit on DIN. SCLK then toggles every DIV processing
// cycles; the DAC samples DIN on each falling edge and DIN changes after
// each rising edge, so it is stable for a full half period around the
// sampling edge. After the 32nd falling edge SCLK returns high, SYNC_n rises
// and stays high for at least DIV cycles before `done` pulses and the next
// frame may start.
//
// Clocking serial data into the AD5628 through an SPI master follows the
// design description. The frame length and the falling-edge sampling are
// those of the AD5628's 32-bit input register; the clock divider and the
// start/done handshake are this design's choices.
//
// Timing: one frame takes (2*BITS + 1) * DIV + 1 cycles from `start` to
// `done` (BITS = 32); with DIV = 2, SCLK is 12.5 MHz at a 50 MHz clock.
module spi_master #(
  parameter int unsigned BITS = 32,   // frame length
  parameter int unsigned DIV  = 2     // clk cycles per SCLK half period
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [BITS-1:0] data,
  output logic            busy,
  output logic            done,
  output logic            sclk,
  output logic            sync_n,
  output logic            din
);

  typedef enum logic [1:0] {S_IDLE, S_LEAD, S_SHIFT, S_GAP} state_t;

  localparam int unsigned DW = $clog2(DIV + 1);
  localparam int unsigned BW = $clog2(BITS + 1);

  state_t          state;
  logic [DW-1:0]   div_cnt;
  logic [BW-1:0]   nbits;
  logic [BITS-1:0] shreg;
  logic            tick;

  assign tick = (div_cnt == DW'(DIV - 1));
  assign busy = (state != S_IDLE);
  assign din  = shreg[BITS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      div_cnt <= '0;
      nbits   <= '0;
      shreg   <= '0;
      sclk    <= 1'b1;
      sync_n  <= 1'b1;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      div_cnt <= (state == S_IDLE || tick) ? '0 : div_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          shreg  <= data;
          sync_n <= 1'b0;
          sclk   <= 1'b1;
          nbits  <= '0;
          state  <= S_LEAD;
        end
        S_LEAD: if (tick) begin
          sclk  <= 1'b0;                 // first falling edge
          state <= S_SHIFT;
        end
        S_SHIFT: if (tick) begin
          if (!sclk) begin               // rising edge
            sclk  <= 1'b1;
            nbits <= nbits + 1'b1;
            if (nbits == BW'(BITS - 1)) begin
              sync_n <= 1'b1;
              state  <= S_GAP;
            end else begin
              shreg <= {shreg[BITS-2:0], 1'b0};
            end
          end else begin                 // falling edge
            sclk <= 1'b0;
          end
        end
        S_GAP: if (tick) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
