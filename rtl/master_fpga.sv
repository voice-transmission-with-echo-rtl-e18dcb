// master_fpga: the transmitting FPGA of the voice link.
//
// Chain: adc_spi_rx reads the LTC1407A-1 at the sampling rate (25 kHz by
// default) and keeps the upper 12 bits of channel 0; downsample halves the
// rate; effect_unit adds the echo or reverb selected by mode from the
// 4096 x 12 delay memory; frame_tx wraps each processed sample in a 28-bit
// frame and sends it over the two-wire link (clock and data; the third wire
// of the link is ground). This chain follows the master block diagram: ADC
// receive block, down-sampling, delay memory with gain and adder, frame
// generator and transmitter. Which ADC channel carries the voice (channel
// 0) is this design's choice.
//
// Rates: one frame per delay-line sample (12.5 kHz), 28 link clocks of
// 1 us each, so the link is busy 35% of the time.
module master_fpga
  import voice_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 2000,   // clocks per ADC sample
  parameter int unsigned ADC_HALF   = 4,      // ADC SCK half period, clocks
  parameter int unsigned DS_FACTOR  = 2,      // down-sampling factor
  parameter int unsigned DEPTH      = 4096,   // delay memory words
  parameter int unsigned LINK_HALF  = 25      // link clock half period, clocks
) (
  input  logic         clk,
  input  logic         rst_n,
  input  effect_mode_t mode,
  // ADC pins
  output logic         ad_conv,
  output logic         adc_sck,
  input  logic         adc_miso,
  // link to the slave FPGA
  output logic         link_clk,
  output logic         link_data,
  // observation
  output logic         fx_valid,
  output sample_t      fx_sample,
  output logic [7:0]   link_drops
);

  logic                    adc_valid;
  logic signed [ADC_W-1:0] adc_ch0, adc_ch1;
  sample_t                 adc_sample;
  logic                    ds_valid;
  logic [SAMPLE_W-1:0]     ds_data;
  logic                    fx_ready;
  logic                    tx_ready;

  adc_spi_rx #(.SAMPLE_DIV(SAMPLE_DIV), .SCK_HALF(ADC_HALF)) u_adc (
    .clk     (clk),
    .rst_n   (rst_n),
    .ad_conv (ad_conv),
    .spi_sck (adc_sck),
    .spi_miso(adc_miso),
    .valid   (adc_valid),
    .ch0     (adc_ch0),
    .ch1     (adc_ch1),
    .sample  (adc_sample)
  );

  downsample #(.FACTOR(DS_FACTOR), .WIDTH(SAMPLE_W)) u_ds (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (adc_valid),
    .in_data  (adc_sample),
    .out_valid(ds_valid),
    .out_data (ds_data)
  );

  effect_unit #(.DEPTH(DEPTH)) u_fx (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .in_valid  (ds_valid),
    .in_sample (sample_t'(ds_data)),
    .in_ready  (fx_ready),
    .out_valid (fx_valid),
    .out_sample(fx_sample)
  );

  frame_tx #(.CLK_HALF(LINK_HALF)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .data_valid(fx_valid),
    .data      (fx_sample),
    .ready     (tx_ready),
    .link_clk  (link_clk),
    .link_data (link_data),
    .drops     (link_drops)
  );

endmodule
