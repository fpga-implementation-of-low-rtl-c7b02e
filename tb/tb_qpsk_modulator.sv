// tb_qpsk_modulator: self-checking test of the memory-based modulator core.
//
// The testbench plays the PN source and demultiplexer: it answers every
// bit_req with a random bit and pairs the bits itself, so it knows which
// symbol must follow. Each sample taken is compared with
// sqrt(2)*65534*cos(2*pi*i/100 + phase(symbol)) within 2 LSB, where the
// symbol-to-phase map is 00:135, 01:225, 10:45, 11:315 degrees. It checks
// 100 samples per symbol, two bit requests per symbol, that idle RAMs sit at
// address 99, and, in a run with smp_ready held high, that a symbol takes
// exactly 100 clocks. A second phase stalls the consumer at random.
module tb_qpsk_modulator;
  localparam int  N     = 100;
  localparam real AMPL  = 65534.0;
  localparam real PI    = 3.14159265358979323846;
  localparam int  PHASE [4] = '{135, 225, 45, 315};

  logic clk = 0, rst;
  logic [1:0] pair;
  logic bit_req, smp_ready, smp_valid, sym_start;
  logic signed [19:0] smp;
  logic [1:0] sym;
  logic [6:0] ram_addr [4];
  int checks = 0, failures = 0;

  qpsk_modulator dut (.clk, .rst, .pair, .bit_req, .smp_ready, .smp_valid, .smp,
                      .sym, .sym_start, .ram_addr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Testbench-side bit source and pairing.
  bit         have_first, first_bit;
  logic [1:0] sym_queue [$];
  int         bits_in_symbol;
  always @(posedge clk) begin
    if (!rst && bit_req) begin
      bit b;
      b = 1'($urandom);
      bits_in_symbol++;
      if (!have_first) begin
        first_bit  <= b; have_first = 1;
      end else begin
        pair <= {first_bit, b}; have_first = 0;
        sym_queue.push_back({first_bit, b});
      end
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [1:0] exp_sym;
    int idx, nsym, cyc, sym_first_cyc, seen [4];
    bit ended;
    real e, err;
    rst = 1; smp_ready = 0; pair = 2'b00; have_first = 0; bits_in_symbol = 0;
    seen = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst = 0;
    exp_sym = 2'b00;   // first symbol after reset
    idx = 0; nsym = 0; cyc = 0; sym_first_cyc = 0; ended = 0;
    // wait for the first sample
    @(posedge clk); #1;
    check(smp_valid === 1'b1, "smp_valid after first step");
    while (nsym < 60) begin
      smp_ready = (nsym < 30) ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      if (smp_valid && smp_ready) begin
        check(sym === exp_sym, $sformatf("symbol %0d: sym %b expected %b", nsym, sym, exp_sym));
        check(sym_start === (idx == 0), $sformatf("sym_start at sample %0d", idx));
        e   = $sqrt(2.0) * AMPL * $cos(2.0 * PI * real'(idx) / real'(N) + real'(PHASE[exp_sym]) * PI / 180.0);
        err = real'(smp) - e;
        check(err <= 2.0 && err >= -2.0,
              $sformatf("symbol %0d sample %0d: %0d expected %f", nsym, idx, smp, e));
        for (int k = 0; k < 4; k++)
          if (k != int'(sym))
            check(ram_addr[k] == 7'(N - 1), $sformatf("idle RAM%0d addr %0d", k+1, ram_addr[k]));
        if (idx == N - 1) begin
          if (nsym < 30)
            check(cyc - sym_first_cyc == N - 1, $sformatf("symbol length %0d clocks", cyc - sym_first_cyc + 1));
          seen[exp_sym]++;
          ended = 1;
          nsym++;
          idx = 0;
          sym_first_cyc = cyc + 1;
          // symbols must arrive in the order the bits were paired
          if (sym_queue.size() == 0) check(0, "no pair ready at symbol boundary");
          else exp_sym = sym_queue.pop_front();
        end else begin
          idx++;
        end
      end
      @(posedge clk);
      cyc++;
      #1;
      // two bits per symbol: one request right after reset, then two per
      // symbol, the second of them on the step past its last sample
      if (ended) begin
        check(bits_in_symbol == 2 * nsym + 1, $sformatf("bit requests %0d after %0d symbols",
                                                        bits_in_symbol, nsym));
        ended = 0;
      end
    end
    for (int k = 0; k < 4; k++) check(seen[k] > 0, $sformatf("symbol %0d never played", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
