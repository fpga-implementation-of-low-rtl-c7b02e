// demux_1to2: serial-to-pair splitter in front of the QPSK modulator.
//
// Serial bits arrive with bit_valid. They are steered alternately into two
// registers: the first bit of each pair is the I bit, the second the Q bit.
// When the second bit lands, pair = {first, second} is updated and
// pair_valid pulses for one clock; pair then holds until the next pair
// completes. Reset clears the pair to 00 and expects a first bit next.
//
// The split into two streams follows the document; holding the completed
// pair and the pulse are this design's interface choices.
module demux_1to2 (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_valid,
  input  logic       bit_i,
  output logic [1:0] pair,
  output logic       pair_valid
);

  logic second;     // 1: the next bit is the second of the pair
  logic first_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      second     <= 1'b0;
      first_bit  <= 1'b0;
      pair       <= 2'b00;
      pair_valid <= 1'b0;
    end else begin
      pair_valid <= 1'b0;
      if (bit_valid) begin
        second <= ~second;
        if (!second) begin
          first_bit <= bit_i;
        end else begin
          pair       <= {first_bit, bit_i};
          pair_valid <= 1'b1;
        end
      end
    end
  end

endmodule
