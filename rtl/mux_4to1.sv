// mux_4to1: the 4-to-1 multiplexer between the four phase RAMs and the
// output of the QPSK modulator.
//
// The 2-bit symbol picks which store drives the output: 00 -> RAM 1,
// 01 -> RAM 2, 10 -> RAM 3, 11 -> RAM 4 (d[0]..d[3]), as in the document's
// RAM/phase table. Purely combinational, no latency.
module mux_4to1 #(
  parameter int W = 20
) (
  input  logic [1:0]   sel,
  input  logic [W-1:0] d [4],
  output logic [W-1:0] y
);

  always_comb begin
    unique case (sel)
      2'b00: y = d[0];
      2'b01: y = d[1];
      2'b10: y = d[2];
      2'b11: y = d[3];
    endcase
  end

endmodule
