// phase_ram: one of the four waveform stores of the QPSK modulator.
//
// It holds DEPTH samples, one carrier period, of the QPSK signal for the
// symbol PHASE_IDX (0..3 = RAM 1..4 = 135, 225, 45, 315 degrees) and plays
// them out through its own address counter. The counter advances by one each
// clock that en is high and wraps from DEPTH-1 to 0; while en is low it
// holds, so an idle store sits at its last address, DEPTH-1, and the store
// that is selected next starts again at 0. Reset puts the counter at DEPTH-1.
//
// Read is asynchronous: q is the sample at the current addr in the same
// cycle. The contents are computed at elaboration by qpsk_pkg::qpsk_sample,
// so the store is a constant array (a ROM in synthesis); the document calls
// it RAM but describes no write path.
//
// The 100-entry depth, the 20-bit sample and the per-store counter that idles
// at 99 follow the document; the rounding of the table is this design's own.
module phase_ram
  import qpsk_pkg::*;
#(
  parameter int PHASE_IDX = 0,
  parameter int DEPTH     = N_SAMPLES,
  parameter int SAMPLE_W  = SAMPLE_BITS,
  parameter int AMPL      = AMPL_DEF,
  parameter int AW        = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  output logic [AW-1:0]              addr,
  output logic signed [SAMPLE_W-1:0] q
);

  typedef logic signed [SAMPLE_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int n = 0; n < DEPTH; n++)
      t[n] = SAMPLE_W'(qpsk_sample(PHASE_IDX, n, DEPTH, AMPL));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (rst)
      addr <= LAST;
    else if (en)
      addr <= (addr == LAST) ? '0 : addr + 1'b1;
  end

  assign q = TABLE[addr];

endmodule
