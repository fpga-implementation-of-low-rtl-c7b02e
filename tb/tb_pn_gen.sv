// tb_pn_gen: self-checking test of the PN test-data generator.
//
// The expected stream is built from the LFSR recurrence o[k] = o[k-7] ^
// o[k-6] with seven leading ones (the all-ones seed), independently of the
// shift register. The test also checks that the output holds while step is
// low, that the period is 127 with 64 ones, and that reset reloads the seed.
module tb_pn_gen;
  logic clk = 0, rst, step, bit_o;
  int checks = 0, failures = 0;
  bit exp_s [0:299];

  pn_gen dut (.clk, .rst, .step, .bit_o);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    int k, ones;
    for (k = 0; k < 7; k++) exp_s[k] = 1'b1;
    for (k = 7; k < 300; k++) exp_s[k] = exp_s[k-7] ^ exp_s[k-6];
    rst = 1; step = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    k = 0;
    ones = 0;
    while (k < 300) begin
      step = ($urandom_range(0, 2) != 0);
      #1 check(bit_o, exp_s[k], $sformatf("bit %0d", k));
      @(posedge clk); #1;
      if (step) begin
        if (k < 127) ones += int'(exp_s[k]);
        k++;
      end
    end
    step = 0;
    // period 127 and balance of a maximal-length sequence
    for (k = 0; k < 127; k++) check(exp_s[k], exp_s[k+127], "period");
    checks++;
    if (ones != 64) begin failures++; $display("FAIL ones in period = %0d", ones); end
    // reset reloads the seed: first seven bits are ones again
    rst = 1; @(posedge clk); #1 rst = 0;
    for (k = 0; k < 8; k++) begin
      step = 1;
      #1 check(bit_o, exp_s[k], $sformatf("after reset bit %0d", k));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
