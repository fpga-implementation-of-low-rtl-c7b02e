// pn_gen: pseudorandom test-data source of the QPSK modulator.
//
// A Fibonacci LFSR of LFSR_W bits. TAPS marks the register bits that are
// XORed into the new bit; the default x^7 + x^6 + 1 gives the maximal
// period 127. bit_o is the register's top bit. The register shifts once each
// clock that step is high, so the modulator sets the bit rate. Reset loads
// SEED (must be non-zero).
//
// The document only says a PN sequence generator supplies the serial input;
// length, polynomial, seed and the step input are this design's choices.
module pn_gen #(
  parameter int                 LFSR_W = 7,
  parameter logic [LFSR_W-1:0]  TAPS   = 7'h60,
  parameter logic [LFSR_W-1:0]  SEED   = '1
) (
  input  logic clk,
  input  logic rst,
  input  logic step,
  output logic bit_o
);

  logic [LFSR_W-1:0] lfsr;

  always_ff @(posedge clk) begin
    if (rst)
      lfsr <= SEED;
    else if (step)
      lfsr <= {lfsr[LFSR_W-2:0], ^(lfsr & TAPS)};
  end

  assign bit_o = lfsr[LFSR_W-1];

  initial assert (SEED != '0) else $error("pn_gen: SEED must be non-zero");

endmodule
