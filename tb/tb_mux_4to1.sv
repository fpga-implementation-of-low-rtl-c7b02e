// tb_mux_4to1: self-checking test of the 4-to-1 sample multiplexer.
// Random data on all four inputs; each select value must route its input.
module tb_mux_4to1;
  logic [1:0]  sel;
  logic [19:0] d [4];
  logic [19:0] y;
  int checks = 0, failures = 0;

  mux_4to1 dut (.sel, .d, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits [4];
    hits = '{0, 0, 0, 0};
    for (int c = 0; c < 400; c++) begin
      for (int k = 0; k < 4; k++) d[k] = 20'($urandom);
      sel = 2'($urandom);
      #1;
      checks++;
      hits[sel]++;
      if (y !== d[sel]) begin
        failures++;
        $display("FAIL sel=%0d y=%h expected %h", sel, y, d[sel]);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (hits[k] == 0) begin failures++; $display("FAIL select %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
