// tb_demux_1to2: self-checking test of the 1-2 demultiplexer.
//
// Random bits arrive at random times. A scoreboard pairs them in arrival
// order (first bit -> pair[1], second -> pair[0]) and checks pair and the
// one-clock pair_valid pulse after every clock, including that pair holds
// between pulses.
module tb_demux_1to2;
  logic clk = 0, rst, bit_valid, bit_i;
  logic [1:0] pair;
  logic pair_valid;
  int checks = 0, failures = 0;

  demux_1to2 dut (.clk, .rst, .bit_valid, .bit_i, .pair, .pair_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit        have_first;
    bit        first;
    logic [1:0] exp_pair;
    bit        exp_valid;
    int        pairs;
    rst = 1; bit_valid = 0; bit_i = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    have_first = 0; exp_pair = 2'b00; pairs = 0;
    #1;
    checks++; if (pair !== 2'b00 || pair_valid !== 1'b0) begin failures++; $display("FAIL reset state"); end
    for (int c = 0; c < 2000; c++) begin
      bit_valid = ($urandom_range(0, 1) == 1);
      bit_i     = 1'($urandom);
      exp_valid = 0;
      if (bit_valid) begin
        if (!have_first) begin
          first = bit_i; have_first = 1;
        end else begin
          exp_pair = {first, bit_i}; exp_valid = 1; have_first = 0; pairs++;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (pair !== exp_pair || pair_valid !== exp_valid) begin
        failures++;
        $display("FAIL cycle %0d: pair %b/%b valid %b/%b", c, pair, exp_pair, pair_valid, exp_valid);
      end
    end
    checks++;
    if (pairs < 400) begin failures++; $display("FAIL too few pairs %0d", pairs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
