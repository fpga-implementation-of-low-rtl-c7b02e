// tb_dac_spi_master_32: self-checking test of the LTC2624 SPI master in
// its 32-bit protocol setting (FRAME_BITS = 32).
//
// Same receiver and checks as the 24-bit test: command 0011, address 0000,
// the code and the trailing zeros in the last 24 bits, plus eight leading
// zero bits, spi_sck at clk/2, 64 clocks with dac_cs low and back-to-back
// frames every 65 clocks.
module tb_dac_spi_master_32;
  logic clk = 0, rst;
  logic s_valid, s_ready;
  logic [11:0] s_data;
  logic dac_cs, spi_sck, spi_mosi;
  int checks = 0, failures = 0;

  dac_spi_master #(.FRAME_BITS(32)) dut (.clk, .rst, .s_valid, .s_ready, .s_data, .dac_cs, .spi_sck, .spi_mosi);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // clock-level monitor
  int   cyc = 0, cs_fall_cyc = -1, last_fall = -1, frame_len;
  int   nbits = 0;
  logic [31:0] rx;
  logic sck_q = 0, mosi_q = 0, cs_q = 1;
  logic [11:0] sent [$];
  int   frames = 0, b2b = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      // receiver: a rising sck seen at this clock
      if (spi_sck && !sck_q) begin
        if (!dac_cs) begin rx = {rx[30:0], spi_mosi}; nbits++; end
        else check(0, "sck rising outside frame");
        check(spi_mosi == mosi_q, "mosi changed with rising sck");
      end
      if (spi_sck && sck_q) check(0, "sck high for two clocks");
      if (!spi_sck && !sck_q && !dac_cs && !cs_q) check(0, "sck low for two clocks inside frame");
      if (!dac_cs && cs_q) begin
        if (last_fall >= 0 && cyc - last_fall == 65) b2b++;
        if (last_fall >= 0) check(cyc - last_fall >= 65, $sformatf("frame period %0d", cyc - last_fall));
        last_fall = cyc; nbits = 0;
      end
      if (dac_cs && !cs_q) begin
        logic [11:0] exp_code;
        frame_len = cyc - last_fall;
        check(frame_len == 64, $sformatf("cs low for %0d clocks", frame_len));
        check(nbits == 32, $sformatf("frame of %0d bits", nbits));
        check(rx[23:20] == 4'b0011, $sformatf("command %b", rx[23:20]));
        check(rx[19:16] == 4'b0000, $sformatf("address %b", rx[19:16]));
        check(rx[3:0] == 4'b0000, "trailing bits");
        check(rx[31:24] == 8'h00, "leading don't-care bits");
        if (sent.size() == 0) check(0, "frame without a code");
        else begin
          exp_code = sent.pop_front();
          check(rx[15:4] == exp_code, $sformatf("code %h expected %h", rx[15:4], exp_code));
        end
        frames++;
      end
    end
    sck_q  <= spi_sck;
    mosi_q <= spi_mosi;
    cs_q   <= dac_cs;
  end

  initial begin
    rst = 1; s_valid = 0; s_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(dac_cs === 1'b1 && spi_sck === 1'b0 && s_ready === 1'b1, "idle after reset");
    for (int n = 0; n < 60; n++) begin
      s_valid = 1;
      s_data  = 12'($urandom);
      if (n >= 30) while ($urandom_range(0, 3) != 0) begin
        s_valid = 0; @(posedge clk); #1; s_valid = 1;
      end
      #1;
      while (!s_ready) begin @(posedge clk); #1; end
      sent.push_back(s_data);
      @(posedge clk); #1;
      s_valid = 0;
      check(!s_ready && !dac_cs, "frame started");
    end
    while (!s_ready) @(posedge clk);
    repeat (4) @(posedge clk);
    check(frames == 60, $sformatf("%0d frames", frames));
    check(b2b >= 25, $sformatf("back-to-back frames at 65 clocks: %0d", b2b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
