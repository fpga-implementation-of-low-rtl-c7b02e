// digital_qpsk: low-power memory-based QPSK modulator for a Spartan-3E
// board, driving the on-board LTC2624 DAC.
//
// Data path: a PN generator supplies serial test bits, the 1-2
// demultiplexer pairs them into 2-bit symbols, the modulator core plays the
// one of four phase RAMs that the symbol selects (one carrier period of 100
// samples per symbol), the RRC filter pulse-shapes and up-samples by 4, and
// the samples are turned into 12-bit DAC codes and sent to DAC A over SPI.
//
// Pacing is pulled from the end: the SPI master takes one filter output per
// frame (49 clocks), the filter takes one modulator sample per 4 outputs,
// and the modulator requests two PN bits per symbol. So one symbol lasts
// 100 * 4 * 49 = 19600 clocks and every stored sample reaches the DAC.
//
// DAC code: code = clamp((sample >>> DAC_SHIFT) + 2048, 0, 4095), offset
// binary around mid-scale; with the default amplitude the codes span about
// 600..3500.
//
// The other outputs keep the rest of the board's shared SPI bus quiet and
// the DAC out of clear: dac_clr, spi_ss_b, amp_cs, sf_ce0 and fpga_init_b
// high, ad_conv low.
//
// From the document: the block chain, the port list, the constant levels of
// the board signals, the DAC frame. This design's own: the pull-based
// pacing, the DAC code conversion, active-high synchronous reset.
module digital_qpsk
  import qpsk_pkg::*;
#(
  parameter int DAC_SHIFT = 6
) (
  input  logic clk,
  input  logic reset,
  output logic ad_conv,
  output logic amp_cs,
  output logic dac_clr,
  output logic dac_cs,
  output logic dac_mosi,
  output logic dac_sck,
  output logic fpga_init_b,
  output logic sf_ce0,
  output logic spi_ss_b
);

  logic    pn_bit;
  logic    bit_req;
  symbol_t pair;
  logic    smp_valid, smp_ready;
  sample_t smp;
  logic    flt_valid, flt_ready;
  sample_t flt_data;
  dac_code_t dac_code;

  pn_gen u_pn (
    .clk   (clk),
    .rst   (reset),
    .step  (bit_req),
    .bit_o (pn_bit)
  );

  demux_1to2 u_demux (
    .clk        (clk),
    .rst        (reset),
    .bit_valid  (bit_req),
    .bit_i      (pn_bit),
    .pair       (pair),
    .pair_valid ()
  );

  qpsk_modulator u_mod (
    .clk       (clk),
    .rst       (reset),
    .pair      (pair),
    .bit_req   (bit_req),
    .smp_ready (smp_ready),
    .smp_valid (smp_valid),
    .smp       (smp),
    .sym       (),
    .sym_start (),
    .ram_addr  ()
  );

  rrc_tx_filter #(.W(SAMPLE_BITS)) u_rrc (
    .clk       (clk),
    .rst       (reset),
    .in_valid  (smp_valid),
    .in_ready  (smp_ready),
    .in_data   (smp),
    .out_valid (flt_valid),
    .out_ready (flt_ready),
    .out_data  (flt_data)
  );

  // Signed sample to offset-binary DAC code.
  localparam int SW = SAMPLE_BITS + 1;
  logic signed [SW-1:0] code_wide;
  always_comb begin
    code_wide = SW'(flt_data >>> DAC_SHIFT) + SW'(2 ** (DAC_W - 1));
    if (code_wide < 0)
      dac_code = '0;
    else if (code_wide > SW'(2 ** DAC_W - 1))
      dac_code = '1;
    else
      dac_code = code_wide[DAC_W-1:0];
  end

  dac_spi_master u_spi (
    .clk      (clk),
    .rst      (reset),
    .s_valid  (flt_valid),
    .s_ready  (flt_ready),
    .s_data   (dac_code),
    .dac_cs   (dac_cs),
    .spi_sck  (dac_sck),
    .spi_mosi (dac_mosi)
  );

  assign dac_clr     = 1'b1;
  assign spi_ss_b    = 1'b1;
  assign amp_cs      = 1'b1;
  assign ad_conv     = 1'b0;
  assign sf_ce0      = 1'b1;
  assign fpga_init_b = 1'b1;

endmodule
