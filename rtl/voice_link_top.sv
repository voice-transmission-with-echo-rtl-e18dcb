// voice_link_top: the whole voice link, master and slave FPGA joined.
//
// The master FPGA (clk_m) samples the voice through the ADC, adds echo or
// reverb and sends 28-bit frames over a clock-and-data link; the slave FPGA
// (clk_s, its own oscillator) decodes the frames and drives the DAC. The
// analog parts around them (signal source, pre-amplifier, the ADC and DAC
// chips, the output amplifier and speaker) are outside; their pins are the
// ports of this module. Beside the link stands the DAC bring-up design
// (sine_dac_test), with its own DAC pins test_*, as a separate design that
// shares only the slave clock and reset.
//
// Timing with the defaults (50 MHz clocks): ADC sample every 40 us, one
// processed sample and one frame every 80 us, link clock 1 MHz, one DAC
// update per frame.
module voice_link_top
  import voice_pkg::*;
(
  input  logic                clk_m,
  input  logic                clk_s,
  input  logic                rst_n,
  input  effect_mode_t        mode,
  // ADC (master side)
  output logic                ad_conv,
  output logic                adc_sck,
  input  logic                adc_miso,
  // DAC (slave side)
  output logic                dac_cs_n,
  output logic                dac_sck,
  output logic                dac_mosi,
  output logic                dac_clr_n,
  // link, brought out for observation
  output logic                link_clk,
  output logic                link_data,
  // observation
  output logic                fx_valid,
  output sample_t             fx_sample,
  output logic [7:0]          link_drops,
  output logic                rx_valid,
  output logic [SAMPLE_W-1:0] rx_data,
  output logic [15:0]         rx_frames,
  // DAC bring-up design
  output logic                test_dac_cs_n,
  output logic                test_dac_sck,
  output logic                test_dac_mosi,
  output logic                test_dac_clr_n,
  output logic [5:0]          test_index
);

  master_fpga u_master (
    .clk       (clk_m),
    .rst_n     (rst_n),
    .mode      (mode),
    .ad_conv   (ad_conv),
    .adc_sck   (adc_sck),
    .adc_miso  (adc_miso),
    .link_clk  (link_clk),
    .link_data (link_data),
    .fx_valid  (fx_valid),
    .fx_sample (fx_sample),
    .link_drops(link_drops)
  );

  slave_fpga u_slave (
    .clk      (clk_s),
    .rst_n    (rst_n),
    .link_clk (link_clk),
    .link_data(link_data),
    .dac_cs_n (dac_cs_n),
    .dac_sck  (dac_sck),
    .dac_mosi (dac_mosi),
    .dac_clr_n(dac_clr_n),
    .rx_valid (rx_valid),
    .rx_data  (rx_data),
    .rx_frames(rx_frames)
  );

  sine_dac_test u_sine (
    .clk      (clk_s),
    .rst_n    (rst_n),
    .dac_cs_n (test_dac_cs_n),
    .spi_sck  (test_dac_sck),
    .spi_mosi (test_dac_mosi),
    .dac_clr_n(test_dac_clr_n),
    .index    (test_index)
  );

endmodule
