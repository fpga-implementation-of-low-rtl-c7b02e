// tb_digital_qpsk: end-to-end test of the QPSK modulator with its DAC link,
// at the design's default parameters.
//
// The design's SPI pins drive a behavioural LTC2624. A reference model in
// the testbench rebuilds the whole chain from first principles: the PN bit
// stream (x^7 + x^6 + 1, all-ones seed), symbols of two bits with 00 first,
// 100 samples per symbol from the carrier phase table (00:135, 01:225,
// 10:45, 11:315 degrees), the 25-tap RRC interpolator (alpha 0.5, L = 4) and
// the DAC code clamp((y >>> 6) + 2048). Every frame the DAC receives must
// carry the expected code for DAC A within 1 LSB. It also checks the fixed
// board-signal levels, that frames repeat every 49 clocks, and that a symbol
// lasts 400 frames (19600 clocks). Events counted, each of which must occur:
// every symbol value played, a change of symbol (RAM switch), a repeated
// symbol, each of the four filter phases, CS-high gaps between frames, and
// DAC output voltages on both sides of mid-scale.
module tb_digital_qpsk;
  localparam int  NSYM = 24;
  localparam int  N = 100, L = 4, NT = 25, SEG = 7;
  localparam real PI = 3.14159265358979323846;
  localparam real AMPL = 65534.0;
  localparam real ALPHA = 0.5;

  logic clk = 0, reset;
  logic ad_conv, amp_cs, dac_clr, dac_cs, dac_mosi, dac_sck, fpga_init_b, sf_ce0, spi_ss_b;
  logic [11:0] code [4];
  real  vout [4];
  int   frames, bad_frames;
  int   checks = 0, failures = 0;

  digital_qpsk dut (.clk, .reset, .ad_conv, .amp_cs, .dac_clr, .dac_cs, .dac_mosi, .dac_sck,
                    .fpga_init_b, .sf_ce0, .spi_ss_b);

  ltc2624_model dac (.cs_n(dac_cs), .sck(dac_sck), .mosi(dac_mosi), .clr_n(dac_clr),
                     .code, .vout, .frames, .bad_frames);

  always #10 clk = ~clk;   // 50 MHz board clock

  initial begin : watchdog
    repeat (NSYM * 19600 + 50000) @(posedge clk);
    failures++;
    $display("watchdog: frames %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ---------------- reference model ----------------
  bit     pn [0:2*NSYM+20];
  int     syms [NSYM+1];
  longint coef [SEG*L];

  function automatic real pulse(input real t);
    real x;
    if (t == 0.0) return 1.0 - ALPHA + 4.0 * ALPHA / PI;
    x = 4.0 * ALPHA * t;
    if (x == 1.0 || x == -1.0)
      return ALPHA / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * ALPHA)) +
                                   (1.0 - 2.0 / PI) * $cos(PI / (4.0 * ALPHA)));
    return ($sin(PI * t * (1.0 - ALPHA)) + x * $cos(PI * t * (1.0 + ALPHA))) / (PI * t * (1.0 - x * x));
  endfunction

  function automatic longint rnd(input real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(0.5 - v));
  endfunction

  // modulator sample number n (all symbols back to back)
  function automatic longint sample(input int n);
    int s, i;
    longint c, q;
    if (n < 0) return 0;
    s = n / N; i = n % N;
    c = rnd(AMPL * $cos(2.0 * PI * real'(i) / real'(N)));
    q = rnd(AMPL * $sin(2.0 * PI * real'(i) / real'(N)));
    // I bit chooses the sign of cos, Q bit the sign of sin
    return ((syms[s] & 2) ? c : -c) + ((syms[s] & 1) ? q : -q);
  endfunction

  function automatic int exp_code(input int m);
    int n, p;
    longint acc, y, cw;
    n = m / L; p = m % L;
    acc = 0;
    for (int j = 0; j < SEG; j++) acc += coef[p + j * L] * sample(n - j);
    y = (acc + (64'sd1 <<< 13)) >>> 14;
    if (y > 524287) y = 524287;
    if (y < -524288) y = -524288;
    cw = (y >>> 6) + 2048;
    if (cw < 0) cw = 0;
    if (cw > 4095) cw = 4095;
    return int'(cw);
  endfunction

  // ---------------- frame timing monitor ----------------
  int cyc = 0, last_fall = -1, periods_ok = 0, gaps = 0;
  logic cs_q = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!reset) begin
      if (!dac_cs && cs_q) begin
        if (last_fall >= 0) begin
          check(cyc - last_fall == 49, $sformatf("frame period %0d clocks", cyc - last_fall));
          periods_ok++;
        end
        last_fall = cyc;
      end
      if (dac_cs && !cs_q) gaps++;
    end
    cs_q <= dac_cs;
  end

  initial begin
    real h [SEG*L];
    real sum;
    int seen [4], changes, repeats, phase_hits [4], above, below, sym_start_cyc, got_cyc;
    for (int k = 0; k < 7; k++) pn[k] = 1'b1;
    for (int k = 7; k <= 2 * NSYM + 20; k++) pn[k] = pn[k-7] ^ pn[k-6];
    syms[0] = 0;
    for (int s = 1; s <= NSYM; s++) syms[s] = {pn[2*(s-1)], pn[2*(s-1)+1]};
    sum = 0.0;
    for (int k = 0; k < SEG * L; k++) begin
      h[k] = (k < NT) ? pulse((real'(k) - real'(NT - 1) / 2.0) / real'(L)) : 0.0;
      sum += h[k];
    end
    for (int k = 0; k < SEG * L; k++) coef[k] = rnd(h[k] * real'(L) / sum * 16384.0);
    seen = '{0, 0, 0, 0}; phase_hits = '{0, 0, 0, 0};
    changes = 0; repeats = 0; above = 0; below = 0; sym_start_cyc = 0;

    reset = 1;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    check(dac_clr && spi_ss_b && amp_cs && !ad_conv && sf_ce0 && fpga_init_b,
          "board signal levels");

    for (int m = 0; m < NSYM * N * L; m++) begin
      int e;
      wait (frames + bad_frames == m + 1);
      got_cyc = cyc;
      e = exp_code(m);
      check(bad_frames == 0, "malformed frame");
      check(int'(code[0]) - e <= 1 && e - int'(code[0]) <= 1,
            $sformatf("frame %0d (symbol %0d sample %0d phase %0d): code %0d expected %0d",
                      m, m / (N * L), (m / L) % N, m % L, code[0], e));
      phase_hits[m % L]++;
      if (code[0] > 12'd2048) above++;
      if (code[0] < 12'd2048) below++;
      if (m % (N * L) == 0) begin
        int s;
        s = m / (N * L);
        seen[syms[s]]++;
        if (s > 0) begin
          if (syms[s] != syms[s-1]) changes++; else repeats++;
          check(got_cyc - sym_start_cyc == 19600,
                $sformatf("symbol %0d lasted %0d clocks", s - 1, got_cyc - sym_start_cyc));
        end
        sym_start_cyc = got_cyc;
      end
    end
    check(vout[0] > 0.0 && vout[0] < 3.3, "DAC A voltage in range");
    for (int k = 0; k < 4; k++) check(seen[k] > 0, $sformatf("symbol %0d played %0d times", k, seen[k]));
    for (int k = 0; k < 4; k++) check(phase_hits[k] > 0, $sformatf("filter phase %0d", k));
    check(changes > 0, "symbol changes");
    check(repeats > 0, "repeated symbols");
    check(gaps > 0 && periods_ok > 0, "frame gaps");
    check(above > 0 && below > 0, "output on both sides of mid-scale");
    $display("symbols 00/01/10/11 = %0d/%0d/%0d/%0d, changes %0d, repeats %0d, frames %0d, gaps %0d",
             seen[0], seen[1], seen[2], seen[3], changes, repeats, frames, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
