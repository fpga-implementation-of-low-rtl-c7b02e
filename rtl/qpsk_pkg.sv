// qpsk_pkg: constants, types and elaboration-time table functions shared by
// the digital QPSK modulator.
//
// The modulator keeps one carrier period of the QPSK waveform per symbol in
// each of four phase RAMs, so no carrier is synthesised at run time. RAM k
// (k = 0..3, the symbol value) holds the carrier at the phase listed in
// PHASE_DEG: 00 -> 135, 01 -> 225, 10 -> 45, 11 -> 315 degrees. A stored
// sample is the sum of an I part (+-cos) and a Q part (+-sin), each of
// amplitude AMPL, which equals sqrt(2)*AMPL*cos(2*pi*n/N + phase).
// The 100-sample period, 20-bit sample and 65534 amplitude follow the
// document's tables and waveforms; the exact rounding is this design's own.
package qpsk_pkg;

  localparam int N_SAMPLES   = 100;     // samples per carrier period = per symbol
  localparam int ADDR_W      = 7;       // RAM address width
  localparam int SAMPLE_BITS = 20;      // signed modulator sample width
  localparam int AMPL_DEF    = 65534;   // amplitude of each of the I and Q parts
  localparam int DAC_W       = 12;      // LTC2624 data width

  typedef logic        [1:0]          symbol_t;   // [1] first (I) bit, [0] second (Q) bit
  typedef logic signed [SAMPLE_BITS-1:0] sample_t;
  typedef logic        [ADDR_W-1:0]   addr_t;
  typedef logic        [DAC_W-1:0]    dac_code_t;

  function automatic int round_real(input real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  // Sample n of the stored waveform for symbol sym:
  //   sI*round(ampl*cos(2*pi*n/n_per)) + sQ*round(ampl*sin(2*pi*n/n_per))
  // with sI = sign(cos(phase)) and sQ = -sign(sin(phase)).
  function automatic int qpsk_sample(input logic [1:0] sym, input int n, input int n_per,
                                     input int ampl);
    real th;
    int  c, s;
    th = 2.0 * 3.14159265358979323846 * real'(n) / real'(n_per);
    c  = round_real(real'(ampl) * $cos(th));
    s  = round_real(real'(ampl) * $sin(th));
    // I bit (sym[1]) = 1 gives +cos; Q bit (sym[0]) = 1 gives +sin.
    return (sym[1] ? c : -c) + (sym[0] ? s : -s);
  endfunction

endpackage
