// ltc2624_model: behavioural model of the LTC2624 quad 12-bit DAC as seen
// over its SPI pins (not synthesizable logic; for testbenches).
//
// While cs_n is low, spi_mosi is shifted in on each rising edge of spi_sck.
// On the rising edge of cs_n the last 32 bits are decoded as 8 don't-care
// bits, command, address, 12 data bits and 4 don't-care bits. Command 0011
// (write and update) updates the addressed output (address 1111: all four).
// clr_n low clears all outputs. updates counts the executed writes and bits
// the SCK edges of the last transfer.
module ltc2624_model (
  input  logic        cs_n,
  input  logic        spi_sck,
  input  logic        spi_mosi,
  input  logic        clr_n,
  output logic [11:0] dac_out [4],
  output logic [31:0] last_word,
  output int          updates,
  output int          bits
);
  logic [31:0] sh = '0;
  int          nbits = 0;

  initial begin
    foreach (dac_out[i]) dac_out[i] = '0;
    last_word = '0;
    updates   = 0;
    bits      = 0;
  end

  always @(posedge spi_sck) if (!cs_n) begin
    sh = {sh[30:0], spi_mosi};
    nbits++;
  end

  always @(negedge cs_n) nbits = 0;

  always @(posedge cs_n) begin
    last_word = sh;
    bits      = nbits;
    if (sh[23:20] == 4'b0011) begin
      for (int i = 0; i < 4; i++)
        if (sh[19:16] == 4'b1111 || sh[19:16] == 4'(i)) dac_out[i] = sh[15:4];
      updates++;
    end
  end

  always @(negedge clr_n) foreach (dac_out[i]) dac_out[i] = '0;
endmodule
