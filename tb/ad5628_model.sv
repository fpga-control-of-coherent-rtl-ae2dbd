// ad5628_model: behavioural model of the AD5628 octal 12-bit slow DAC's
// serial input, for testbenches only.
//
// While SYNC_n is low, DIN is shifted in on every falling SCLK edge. When
// the 32nd bit arrives the frame is decoded: command 0011 (write to and
// update channel n) loads the 12-bit code (bits 19:8) into the channel
// given by bits 23:20 (1111 = all channels). A frame cut short by SYNC_n
// rising is counted in `bad_frames` and ignored.
module ad5628_model (
  input  logic        sclk,
  input  logic        sync_n,
  input  logic        din,
  output logic [11:0] code [8],
  output int          frames,
  output int          bad_frames,
  output logic [31:0] last_frame
);
  logic [31:0] sh;
  int          nb;

  initial begin
    frames = 0;
    bad_frames = 0;
    nb = 0;
    sh = '0;
    last_frame = '0;
    for (int i = 0; i < 8; i++) code[i] = 12'd0;
  end

  always @(negedge sync_n) nb = 0;

  always @(posedge sync_n) begin
    if (nb != 0 && nb != 32) bad_frames++;
    nb = 0;
  end

  always @(negedge sclk) begin
    if (!sync_n && nb < 32) begin
      sh = {sh[30:0], din};
      nb++;
      if (nb == 32) begin
        frames++;
        last_frame = sh;
        if (sh[27:24] == 4'b0011) begin
          if (sh[23:20] == 4'hF) begin
            for (int i = 0; i < 8; i++) code[i] = sh[19:8];
          end else if (sh[23] == 1'b0) begin
            code[sh[22:20]] = sh[19:8];
          end
        end
      end
    end
  end
endmodule
