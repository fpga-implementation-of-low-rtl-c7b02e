// qpsk_modulator: memory-based QPSK modulator core.
//
// Instead of mixing NRZ data with DDS-generated sine and cosine carriers,
// the core keeps one carrier period of the finished QPSK waveform for each
// of the four symbols in its own phase RAM and simply plays the RAM that
// the current symbol selects through a 4-to-1 multiplexer.
//
// Symbol control: a symbol lasts exactly one pass through a RAM (N samples).
// A step happens each clock that the consumer takes the sample
// (smp_valid & smp_ready); the very first step after reset is taken on its
// own to fill the pipeline. On the step that crosses a symbol boundary the
// symbol register loads the pair collected by the 1-2 demultiplexer, and
// only the RAM chosen for the coming sample advances its address counter.
// The three idle RAMs keep their counters at N-1, the selected one runs
// 0..N-1. bit_req pulses on the steps to sample 0 and to sample N/2, so two
// serial bits (one symbol, Ts = 2Tb) are gathered during each symbol and
// played as the next one. The first symbol after reset is 00.
//
// Timing: smp, sym and sym_start describe the current sample, valid from
// the clock after the first step; with smp_ready held high one sample is
// produced per clock and a symbol takes N clocks.
//
// From the document: four RAMs, the symbol-to-phase map, 100 samples per
// RAM, 20-bit samples, idle counters at 99. This design's own: the step
// handshake, when bits are requested, the reset symbol.
module qpsk_modulator
  import qpsk_pkg::*;
#(
  parameter int N        = N_SAMPLES,
  parameter int SAMPLE_W = SAMPLE_BITS,
  parameter int AMPL     = AMPL_DEF,
  parameter int AW       = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst,
  // next symbol from the demultiplexer, and the bit request to the PN source
  input  logic [1:0]                 pair,
  output logic                       bit_req,
  // sample stream
  input  logic                       smp_ready,
  output logic                       smp_valid,
  output logic signed [SAMPLE_W-1:0] smp,
  output logic [1:0]                 sym,
  output logic                       sym_start,
  // address counters of RAM 1..4, for observation
  output logic [AW-1:0]              ram_addr [4]
);

  localparam logic [AW-1:0] LAST = AW'(N - 1);
  localparam logic [AW-1:0] HALF = AW'(N / 2);

  logic          started;
  logic [AW-1:0] sym_cnt;
  logic          advance;
  logic          boundary;
  logic [1:0]    next_sym;
  logic [AW-1:0] next_cnt;
  logic [3:0]    ram_en;
  logic [SAMPLE_W-1:0] ram_q [4];
  logic [SAMPLE_W-1:0] mux_y;

  assign advance  = !started || smp_ready;
  assign boundary = (sym_cnt == LAST);
  assign next_sym = boundary ? pair : sym;
  assign next_cnt = boundary ? '0 : sym_cnt + 1'b1;
  assign bit_req  = advance && (next_cnt == '0 || next_cnt == HALF);

  always_comb begin
    ram_en = '0;
    if (advance) ram_en[next_sym] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      started <= 1'b0;
      sym_cnt <= LAST;
      sym     <= 2'b00;
    end else if (advance) begin
      started <= 1'b1;
      sym_cnt <= next_cnt;
      sym     <= next_sym;
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_ram
    phase_ram #(
      .PHASE_IDX(k),
      .DEPTH    (N),
      .SAMPLE_W (SAMPLE_W),
      .AMPL     (AMPL),
      .AW       (AW)
    ) u_ram (
      .clk  (clk),
      .rst  (rst),
      .en   (ram_en[k]),
      .addr (ram_addr[k]),
      .q    (ram_q[k])
    );
  end

  mux_4to1 #(.W(SAMPLE_W)) u_mux (
    .sel (sym),
    .d   (ram_q),
    .y   (mux_y)
  );

  assign smp       = mux_y;
  assign smp_valid = started;
  assign sym_start = started && (sym_cnt == '0);

  // The selected RAM's counter runs in step with the symbol counter.
  always_ff @(posedge clk) begin
    if (!rst && started)
      a_addr_in_step: assert (ram_addr[sym] == sym_cnt)
        else $error("qpsk_modulator: selected RAM address out of step");
  end

endmodule
