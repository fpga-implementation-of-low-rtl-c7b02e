// dac_spi_master: SPI write-and-update master for the LTC2624 DAC.
//
// Each accepted 12-bit code becomes one SPI frame, most significant bit
// first. With FRAME_BITS = 24 the frame is
//   {CMD[3:0], DAC_ADDR[3:0], code[11:0], 4'b0000}
// and with FRAME_BITS = 32 eight leading don't-care bits (sent as 0) come
// first. CMD 0011 writes and updates; DAC_ADDR 0000 is DAC A.
//
// Timing: s_ready is high only while idle, with dac_cs high and spi_sck low.
// On the clock that takes a code, dac_cs falls and the first bit is put on
// spi_mosi with spi_sck low. Each bit then takes two clocks, one with
// spi_sck low and one with spi_sck high, so spi_sck = clk/2 and spi_mosi is
// stable for a full clock before each rising edge, where the DAC samples it.
// After the last high phase dac_cs returns high for at least one clock, so
// back-to-back frames repeat every 2*FRAME_BITS + 1 clocks.
//
// From the document: the 24-bit frame layout, command, address, MSB-first
// order, sampling on the rising SCK edge and SCK at half the clock. The
// valid/ready input and the one-clock CS-high gap are this design's own.
module dac_spi_master #(
  parameter int         FRAME_BITS = 24,
  parameter logic [3:0] CMD        = 4'b0011,
  parameter logic [3:0] DAC_ADDR   = 4'b0000,
  parameter int         DATA_W     = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [DATA_W-1:0] s_data,
  output logic              dac_cs,
  output logic              spi_sck,
  output logic              spi_mosi
);

  localparam int CW = $clog2(FRAME_BITS);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_t;

  state_t                  state;
  logic [FRAME_BITS-1:0]   shreg;
  logic [CW-1:0]           bit_cnt;   // bits still to send after the current one

  // Frame image: 4 trailing don't-care bits, zero-padded at the top for the
  // 32-bit protocol.
  function automatic logic [FRAME_BITS-1:0] frame(input logic [DATA_W-1:0] d);
    return FRAME_BITS'({CMD, DAC_ADDR, d, 4'b0000});
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      shreg   <= '0;
      bit_cnt <= '0;
      dac_cs  <= 1'b1;
      spi_sck <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (s_valid) begin
          shreg   <= frame(s_data);
          bit_cnt <= CW'(FRAME_BITS - 1);
          dac_cs  <= 1'b0;
          state   <= S_LOW;
        end
        S_LOW: begin
          spi_sck <= 1'b1;
          state   <= S_HIGH;
        end
        S_HIGH: begin
          spi_sck <= 1'b0;
          if (bit_cnt == '0) begin
            dac_cs <= 1'b1;
            state  <= S_IDLE;
          end else begin
            shreg   <= shreg << 1;
            bit_cnt <= bit_cnt - 1'b1;
            state   <= S_LOW;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign s_ready  = (state == S_IDLE);
  assign spi_mosi = shreg[FRAME_BITS-1];

  // SCK only pulses inside a frame, and CS only moves while SCK is low.
  logic cs_d;
  always_ff @(posedge clk) begin
    cs_d  <= dac_cs;
    if (!rst) begin
      a_sck_in_frame: assert (!(spi_sck && dac_cs))
        else $error("dac_spi_master: SCK high outside a frame");
      a_cs_stable: assert (dac_cs == cs_d || !spi_sck)
        else $error("dac_spi_master: CS moved while SCK is high");
    end
  end

endmodule
