// tb_rrc_tx_filter: self-checking test of the RRC interpolating filter.
//
// The testbench derives its own 25-tap root-raised-cosine response
// (alpha 0.5, 4 taps per input period), quantises it as the filter is
// specified (taps sum to L, 14 fractional bits) and convolves the
// zero-stuffed random input in plain integer arithmetic; every output must
// match exactly. It also checks that the taps are symmetric with the peak in
// the middle, that a constant input comes out at the same level (unity
// gain), that exactly four outputs follow each input, and random stalls on
// both sides of the handshake.
module tb_rrc_tx_filter;
  localparam int  L = 4, SPAN = 6, NT = SPAN * L + 1, SEG = (NT + L - 1) / L;
  localparam real A  = 0.5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [19:0] in_data, out_data;
  int checks = 0, failures = 0;

  rrc_tx_filter dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint coef [SEG*L];
  longint hist [SEG];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real pulse(input real t);
    real x;
    if (t == 0.0) return 1.0 - A + 4.0 * A / PI;
    x = 4.0 * A * t;
    if (x == 1.0 || x == -1.0)
      return A / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * A)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * A)));
    return ($sin(PI * t * (1.0 - A)) + x * $cos(PI * t * (1.0 + A))) / (PI * t * (1.0 - x * x));
  endfunction

  function automatic longint rnd(input real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(0.5 - v));
  endfunction

  function automatic longint model(input int p);
    longint acc, r;
    acc = 0;
    for (int j = 0; j < SEG; j++) acc += coef[p + j * L] * hist[j];
    r = (acc + (64'sd1 <<< 13)) >>> 14;
    if (r > 524287) r = 524287;
    if (r < -524288) r = -524288;
    return r;
  endfunction

  // Feed n inputs (value from gen) and check all outputs. mode 0: random data,
  // 1: constant dc.
  task automatic run(input int n, input int mode, input longint dc, input bit stalls);
    int taken, outs, p;
    taken = 0;
    while (taken < n) begin
      in_valid = !stalls || ($urandom_range(0, 2) != 0);
      in_data  = (mode == 0) ? 20'($signed($urandom_range(0, 2 * 92000)) - 92000) : 20'(dc);
      #1;
      if (in_valid && in_ready) begin
        for (int j = SEG - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = longint'(in_data);
        taken++;
        check(!out_valid, "out_valid while taking an input");
        @(posedge clk); #1;
        in_valid = 0;
        outs = 0; p = 0;
        while (outs < L) begin
          out_ready = !stalls || ($urandom_range(0, 2) != 0);
          #1;
          check(out_valid === 1'b1 && in_ready === 1'b0, "output pending");
          if (out_ready) begin
            if (mode == 0)
              check(longint'(out_data) == model(p),
                    $sformatf("phase %0d out %0d expected %0d", p, out_data, model(p)));
            else if (taken > SEG)
              check(longint'(out_data) - dc <= dc / 25 && dc - longint'(out_data) <= dc / 25,
                    $sformatf("dc phase %0d out %0d for %0d", p, out_data, dc));
            outs++; p++;
          end
          @(posedge clk); #1;
          out_ready = 0;
        end
        #1 check(in_ready === 1'b1 && out_valid === 1'b0, "four outputs per input");
      end else begin
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    real h [SEG*L];
    real sum;
    longint csum;
    sum = 0.0;
    for (int k = 0; k < SEG * L; k++) begin
      h[k] = (k < NT) ? pulse((real'(k) - real'(NT - 1) / 2.0) / real'(L)) : 0.0;
      sum += h[k];
    end
    csum = 0;
    for (int k = 0; k < SEG * L; k++) begin
      coef[k] = rnd(h[k] * real'(L) / sum * 16384.0);
      csum += coef[k];
    end
    for (int k = 0; k < NT; k++) check(coef[k] == coef[NT - 1 - k], "symmetric taps");
    for (int k = 0; k < NT; k++) check(coef[k] <= coef[(NT - 1) / 2], "peak in the middle");
    check(csum >= 4 * 16384 - 8 && csum <= 4 * 16384 + 8, $sformatf("tap sum %0d", csum));

    for (int j = 0; j < SEG; j++) hist[j] = 0;
    rst = 1; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(150, 0, 0, 1'b0);
    run(150, 0, 0, 1'b1);
    run(20, 1, 50000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
