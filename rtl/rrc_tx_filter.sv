// rrc_tx_filter: root-raised-cosine pulse-shaping and up-sampling filter.
//
// A polyphase interpolating FIR. Each input sample is taken into a shift
// register of SEG = ceil(NTAPS/L) samples, NTAPS = SPAN*L + 1, and then L
// output samples are produced, one per output handshake:
//   y(phase p) = sum_j h[p + j*L] * x[j],   x[0] = newest input,
// which is the zero-stuffed input convolved with h at L times the input
// rate. h is a root-raised-cosine pulse with roll-off ALPHA_PCT/100 and one
// input-sample period per L taps, computed at elaboration, scaled so the
// taps add up to L (unity gain per branch on average) and rounded to COEF_W
// bits with COEF_FRAC fractional bits. The sum is rounded back to W bits
// and saturated.
//
// Handshake: in_ready is high only while the filter has no pending input
// (after the L-th output); out_valid is high while outputs of the current
// input remain. Output is combinational from the registers.
//
// The document asks for an RRC transmit filter that shapes and up-samples
// the QPSK waveform but gives no roll-off, length or factor: alpha = 0.5,
// L = 4 and a span of 6 input samples are this design's choices.
module rrc_tx_filter #(
  parameter int W         = 20,
  parameter int L         = 4,
  parameter int SPAN      = 6,
  parameter int ALPHA_PCT = 50,
  parameter int COEF_W    = 16,
  parameter int COEF_FRAC = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_data
);

  localparam int NTAPS = SPAN * L + 1;
  localparam int SEG   = (NTAPS + L - 1) / L;
  localparam int PW    = (L > 1) ? $clog2(L) : 1;
  localparam int ACC_W = W + COEF_W + $clog2(SEG) + 1;

  typedef logic signed [COEF_W-1:0] coef_t [SEG*L];

  // Root-raised-cosine impulse response at time t (in input-sample periods).
  function automatic real rrc(input real t, input real a);
    real pi, den;
    pi = 3.14159265358979323846;
    if (t == 0.0)
      return 1.0 - a + 4.0 * a / pi;
    if (a > 0.0 && (4.0 * a * t == 1.0 || 4.0 * a * t == -1.0))
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    den = pi * t * (1.0 - (4.0 * a * t) * (4.0 * a * t));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) / den;
  endfunction

  function automatic coef_t build_coefs();
    coef_t c;
    real   h [SEG*L];
    real   sum, a, v;
    a   = real'(ALPHA_PCT) / 100.0;
    sum = 0.0;
    for (int k = 0; k < SEG*L; k++) begin
      h[k] = (k < NTAPS) ? rrc((real'(k) - real'(NTAPS - 1) / 2.0) / real'(L), a) : 0.0;
      sum += h[k];
    end
    for (int k = 0; k < SEG*L; k++) begin
      v    = h[k] * real'(L) / sum * real'(2 ** COEF_FRAC);
      c[k] = COEF_W'((v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v));
    end
    return c;
  endfunction

  localparam coef_t COEF = build_coefs();

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((2 ** (W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(2 ** (W - 1));

  logic signed [W-1:0]     x [SEG];
  logic                    have;
  logic [PW-1:0]           phase;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] rounded;

  assign in_ready  = !have;
  assign out_valid = have;

  always_ff @(posedge clk) begin
    if (rst) begin
      have  <= 1'b0;
      phase <= '0;
      for (int j = 0; j < SEG; j++) x[j] <= '0;
    end else if (in_valid && in_ready) begin
      x[0] <= in_data;
      for (int j = 1; j < SEG; j++) x[j] <= x[j-1];
      have  <= 1'b1;
      phase <= '0;
    end else if (out_valid && out_ready) begin
      if (phase == PW'(L - 1))
        have <= 1'b0;
      else
        phase <= phase + 1'b1;
    end
  end

  always_comb begin
    acc = '0;
    for (int j = 0; j < SEG; j++)
      acc += ACC_W'(COEF[int'(phase) + j*L]) * ACC_W'(x[j]);
    rounded = (acc + ACC_W'(2 ** (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (rounded > OUT_MAX)
      out_data = OUT_MAX[W-1:0];
    else if (rounded < OUT_MIN)
      out_data = OUT_MIN[W-1:0];
    else
      out_data = rounded[W-1:0];
  end

endmodule
