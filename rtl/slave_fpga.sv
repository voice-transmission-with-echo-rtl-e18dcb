// slave_fpga: the receiving FPGA of the voice link.
//
// frame_rx synchronizes the link from the master, finds each 28-bit frame by
// its 16-bit pattern and hands over the 12-bit sample; dac_spi_tx writes it
// to the LTC2624 DAC. The samples are two's complement and the DAC takes
// unsigned codes, so the sign bit is inverted on the way (offset binary,
// code 2048 for silence); that conversion is this design's choice. The
// chain follows the slave block diagram: receiver with frame decoder, DAC
// block, DAC.
module slave_fpga
  import voice_pkg::*;
#(
  parameter int unsigned DAC_HALF = 4,
  parameter logic [3:0]  DAC_ADDR = 4'b0000
) (
  input  logic                clk,
  input  logic                rst_n,
  // link from the master FPGA
  input  logic                link_clk,
  input  logic                link_data,
  // DAC pins
  output logic                dac_cs_n,
  output logic                dac_sck,
  output logic                dac_mosi,
  output logic                dac_clr_n,
  // observation
  output logic                rx_valid,
  output logic [SAMPLE_W-1:0] rx_data,
  output logic [15:0]         rx_frames
);

  logic dac_busy;

  frame_rx u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .link_clk  (link_clk),
    .link_data (link_data),
    .data_valid(rx_valid),
    .data      (rx_data),
    .frames    (rx_frames)
  );

  dac_spi_tx #(.SCK_HALF(DAC_HALF), .ADDR(DAC_ADDR)) u_dac (
    .clk       (clk),
    .rst_n     (rst_n),
    .data_valid(rx_valid),
    .data      ({~rx_data[SAMPLE_W-1], rx_data[SAMPLE_W-2:0]}),
    .busy      (dac_busy),
    .dac_cs_n  (dac_cs_n),
    .spi_sck   (dac_sck),
    .spi_mosi  (dac_mosi),
    .dac_clr_n (dac_clr_n)
  );

endmodule
