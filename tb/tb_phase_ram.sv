// tb_phase_ram: self-checking test of the four phase RAMs.
//
// One instance per symbol (RAM 1..4). Expected samples come from the carrier
// phase of each RAM (135, 225, 45, 315 degrees) as
// sqrt(2)*65534*cos(2*pi*n/100 + phase), which must match within 2 LSB
// (the stores sum a rounded cosine and a rounded sine). The address counter
// must start at 99 after reset, hold while en is low, run 0..99 and wrap.
module tb_phase_ram;
  localparam int DEPTH = 100;
  localparam real AMPL = 65534.0;
  localparam real PI   = 3.14159265358979323846;
  localparam int  PHASE [4] = '{135, 225, 45, 315};

  logic clk = 0, rst;
  logic [3:0] en;
  logic [6:0] addr [4];
  logic signed [19:0] q [4];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g
    phase_ram #(.PHASE_IDX(k)) dut (.clk, .rst, .en(en[k]), .addr(addr[k]), .q(q[k]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(input int k, input int n);
    return $sqrt(2.0) * AMPL * $cos(2.0 * PI * real'(n) / real'(DEPTH) + real'(PHASE[k]) * PI / 180.0);
  endfunction

  initial begin
    int exp_addr [4];
    real e, err;
    rst = 1; en = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    #1;
    for (int k = 0; k < 4; k++) begin
      exp_addr[k] = DEPTH - 1;
      checks++;
      if (addr[k] !== 7'(DEPTH - 1)) begin failures++; $display("FAIL RAM%0d reset addr %0d", k+1, addr[k]); end
    end
    // Spot value printed in the document's sample table: RAM 1 (135 deg) at n = 0
    // is -65534 - (-6) ~ -65528 there; exact rounding gives -65534 - 0.
    for (int c = 0; c < 1500; c++) begin
      en = 4'($urandom);
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin
        if (en[k]) exp_addr[k] = (exp_addr[k] == DEPTH - 1) ? 0 : exp_addr[k] + 1;
        checks++;
        if (int'(addr[k]) != exp_addr[k]) begin
          failures++; $display("FAIL RAM%0d addr %0d expected %0d", k+1, addr[k], exp_addr[k]);
        end
        e   = expected(k, exp_addr[k]);
        err = real'(q[k]) - e;
        checks++;
        if (err > 2.0 || err < -2.0) begin
          failures++; $display("FAIL RAM%0d n=%0d q=%0d expected %f", k+1, exp_addr[k], q[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
