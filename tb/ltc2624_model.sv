// ltc2624_model: behavioural model of the SPI side of the LTC2624 quad
// 12-bit DAC, for testbenches only (not synthesizable).
//
// While cs_n is low, mosi is shifted in on every rising sck. When cs_n
// rises, a frame of 24 or 32 bits is decoded from its last 24 bits:
// command [23:20], address [19:16], code [15:4], don't-care [3:0].
// Command 0011 writes and updates the addressed channel (1111 = all four);
// the channel voltage is code/4096 * Vref, with Vref = 3.3 V for A and B and
// 2.5 V for C and D. A frame of any other length or command is counted in
// bad_frames. clr_n low clears all channels. A rising cs_n without a
// preceding falling edge (power-up) is ignored.
module ltc2624_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        mosi,
  input  logic        clr_n,
  output logic [11:0] code [4],
  output real         vout [4],
  output int          frames,
  output int          bad_frames
);
  logic [31:0] sr;
  int          nbits;
  bit          in_frame;

  initial begin
    frames = 0; bad_frames = 0; nbits = 0; sr = '0; in_frame = 0;
    for (int c = 0; c < 4; c++) begin code[c] = '0; vout[c] = 0.0; end
  end

  always @(negedge cs_n) begin nbits = 0; in_frame = 1; end

  always @(posedge sck) if (!cs_n) begin
    sr = {sr[30:0], mosi};
    nbits++;
  end

  always @(posedge cs_n) if (in_frame) begin
    in_frame = 0;
    if ((nbits == 24 || nbits == 32) && sr[23:20] == 4'b0011) begin
      for (int c = 0; c < 4; c++)
        if (sr[19:16] == 4'(c) || sr[19:16] == 4'b1111) begin
          code[c] = sr[15:4];
          vout[c] = real'(sr[15:4]) / 4096.0 * ((c < 2) ? 3.3 : 2.5);
        end
      frames++;
    end else begin
      bad_frames++;
    end
  end

  always @(negedge clr_n) for (int c = 0; c < 4; c++) begin code[c] = '0; vout[c] = 0.0; end
endmodule
