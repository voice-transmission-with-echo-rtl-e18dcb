// dac_spi_tx: DAC block, writes 12-bit samples to the LTC2624 quad DAC.
//
// For each sample the block lowers DAC_CS, shifts out a 32-bit word on
// SPI_MOSI MSB first and raises DAC_CS again, which makes the DAC update its
// output. The word is, from first bit to last: 8 don't-care bits, the 4-bit
// COMMAND, the 4-bit ADDRESS, the 12-bit unsigned DATA (MSB first) and 4
// don't-care bits, as in the DAC's SPI word layout. The address table
// (0000 = DAC A .. 0011 = DAC D, 1111 = all) follows that layout; the
// choice of DAC A and the command 0011 (write and update) are this design's,
// set by the ADDR and CMD parameters.
//
// SPI_SCK idles low and each half period lasts SCK_HALF clocks. MOSI changes
// while SCK is low and the DAC takes it on the rising edge. DAC_CS is low
// for 65*SCK_HALF clocks (32 bits and a CS hold half period); a sample offered while
// busy is dropped. dac_clr_n holds the DAC cleared during reset.
module dac_spi_tx #(
  parameter int unsigned SCK_HALF = 4,
  parameter logic [3:0]  CMD      = 4'b0011,
  parameter logic [3:0]  ADDR     = 4'b0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_valid,
  input  logic [11:0] data,
  output logic        busy,
  output logic        dac_cs_n,
  output logic        spi_sck,
  output logic        spi_mosi,
  output logic        dac_clr_n
);

  localparam int unsigned HW = (SCK_HALF > 1) ? $clog2(SCK_HALF) : 1;

  typedef enum logic [1:0] {D_IDLE, D_LOW, D_HIGH, D_END} dstate_t;

  dstate_t      state;
  logic [HW-1:0] half_cnt;
  logic [31:0]  shreg;
  logic [5:0]   bit_cnt;

  wire half_done = (half_cnt == HW'(SCK_HALF - 1));

  assign busy = (state != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      half_cnt  <= '0;
      shreg     <= '0;
      bit_cnt   <= '0;
      dac_cs_n  <= 1'b1;
      spi_sck   <= 1'b0;
      spi_mosi  <= 1'b0;
      dac_clr_n <= 1'b0;
    end else begin
      dac_clr_n <= 1'b1;
      half_cnt  <= half_done ? '0 : half_cnt + 1'b1;
      unique case (state)
        D_IDLE: begin
          half_cnt <= '0;
          if (data_valid) begin
            dac_cs_n <= 1'b0;
            spi_mosi <= 1'b0;                         // first don't-care bit
            shreg    <= {8'h00, CMD, ADDR, data, 4'h0} << 1;
            bit_cnt  <= '0;
            state    <= D_LOW;
          end
        end
        D_LOW: if (half_done) begin
          spi_sck <= 1'b1;
          state   <= D_HIGH;
        end
        D_HIGH: if (half_done) begin
          spi_sck <= 1'b0;
          if (bit_cnt == 6'd31) begin
            state <= D_END;
          end else begin
            spi_mosi <= shreg[31];
            shreg    <= shreg << 1;
            bit_cnt  <= bit_cnt + 1'b1;
            state    <= D_LOW;
          end
        end
        D_END: if (half_done) begin
          dac_cs_n <= 1'b1;
          spi_mosi <= 1'b0;
          state    <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
