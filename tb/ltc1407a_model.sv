// ltc1407a_model: behavioural model of the LTC1407A-1 two-channel 14-bit ADC
// as seen over its SPI pins (not synthesizable logic; for testbenches).
//
// The rising edge of ad_conv samples ain0/ain1 (signed 14-bit codes) and
// loads the result of the previous conversion for read-out, so the data come
// one sample late. The 34-bit read-out word is: 2 idle bits, channel 0 MSB
// first, 2 idle bits, channel 1 MSB first, 2 idle bits; idle bits read as 0
// here. The first bit is on spi_miso right after ad_conv rises and the next
// one appears after each falling edge of spi_sck.
module ltc1407a_model (
  input  logic               ad_conv,
  input  logic               spi_sck,
  output logic               spi_miso,
  input  logic signed [13:0] ain0,
  input  logic signed [13:0] ain1,
  output int                 conversions
);
  logic [13:0] held0 = '0, held1 = '0;
  logic [33:0] word = '0;
  int          idx = 0;

  initial begin
    spi_miso    = 1'b0;
    conversions = 0;
  end

  always @(posedge ad_conv) begin
    word     = {2'b00, held0, 2'b00, held1, 2'b00};
    held0    = ain0;
    held1    = ain1;
    idx      = 0;
    spi_miso = word[33];
    conversions++;
  end

  always @(negedge spi_sck) begin
    idx++;
    spi_miso = (idx < 34) ? word[33 - idx] : 1'b0;
  end
endmodule
