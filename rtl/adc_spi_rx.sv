// adc_spi_rx: ADC receive block for the LTC1407A-1 two-channel 14-bit ADC.
//
// Once every SAMPLE_DIV clocks the block raises AD_CONV for one SPI clock
// period; that edge makes the ADC sample both analog inputs. It then runs 34
// SPI_SCK cycles and shifts in SPI_MISO on each rising SCK edge. The word
// read back is the result of the previous AD_CONV (the converter presents a
// conversion one sample late): two idle bits, channel 0 as 14 bits MSB
// first, two idle bits, channel 1 as 14 bits, two idle bits. The AD_CONV
// period therefore sets the sampling rate: 50 MHz / 2000 = 25 kHz by default.
//
// SCK idles low; each half period lasts SCK_HALF clocks (6.25 MHz by
// default). The ADC is expected to change MISO after a falling SCK edge;
// the block samples it at the rising edge. The 34-cycle word, the channel
// order and the one-sample latency follow the converter's timing diagram;
// the clock rates, the 50 MHz system clock and the two's-complement reading
// of the results are this design's choices.
//
// Outputs: ch0/ch1 (signed 14 bit) and sample (the upper 12 bits of ch0),
// all updated together with a one-clock valid pulse after the 34th bit.
module adc_spi_rx
  import voice_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 2000,
  parameter int unsigned SCK_HALF   = 4,
  localparam int unsigned NBITS = 34
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // converter pins
  output logic                     ad_conv,
  output logic                     spi_sck,
  input  logic                     spi_miso,
  // results
  output logic                     valid,
  output logic signed [ADC_W-1:0]  ch0,
  output logic signed [ADC_W-1:0]  ch1,
  output sample_t                  sample
);

  // A conversion cycle must fit into one sample period.
  if (SAMPLE_DIV < 2 * SCK_HALF * (NBITS + 2)) begin : g_rate_check
    $error("adc_spi_rx: SAMPLE_DIV too small for a 34-bit transfer");
  end

  localparam int unsigned DW = $clog2(SAMPLE_DIV);
  localparam int unsigned HW = (SCK_HALF > 1) ? $clog2(SCK_HALF) : 1;

  typedef enum logic [1:0] {A_WAIT, A_CONV, A_LOW, A_HIGH} astate_t;

  astate_t            state;
  logic [DW-1:0]      period_cnt;
  logic [HW-1:0]      half_cnt;
  logic [5:0]         bit_cnt;
  logic [NBITS-1:0]   shreg;

  wire half_done = (half_cnt == HW'(SCK_HALF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= A_WAIT;
      period_cnt <= '0;
      half_cnt   <= '0;
      bit_cnt    <= '0;
      shreg      <= '0;
      ad_conv    <= 1'b0;
      spi_sck    <= 1'b0;
      valid      <= 1'b0;
      ch0        <= '0;
      ch1        <= '0;
      sample     <= '0;
    end else begin
      valid      <= 1'b0;
      period_cnt <= (period_cnt == DW'(SAMPLE_DIV - 1)) ? '0 : period_cnt + 1'b1;
      half_cnt   <= half_done ? '0 : half_cnt + 1'b1;
      unique case (state)
        A_WAIT: begin
          half_cnt <= '0;
          if (period_cnt == '0) begin
            ad_conv <= 1'b1;
            state   <= A_CONV;
          end
        end
        // AD_CONV high for two half periods, then low for one before SCK.
        A_CONV: if (half_done) begin
          if (ad_conv && bit_cnt == 6'd0) begin
            bit_cnt <= 6'd1;
          end else if (ad_conv) begin
            ad_conv <= 1'b0;
            bit_cnt <= '0;
            state   <= A_LOW;
          end
        end
        A_LOW: if (half_done) begin
          spi_sck <= 1'b1;
          shreg   <= {shreg[NBITS-2:0], spi_miso};
          state   <= A_HIGH;
        end
        A_HIGH: if (half_done) begin
          spi_sck <= 1'b0;
          if (bit_cnt == 6'(NBITS - 1)) begin
            bit_cnt <= '0;
            valid   <= 1'b1;
            ch0     <= shreg[31:18];
            ch1     <= shreg[15:2];
            sample  <= sample_t'(shreg[31:20]);
            state   <= A_WAIT;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
            state   <= A_LOW;
          end
        end
        default: state <= A_WAIT;
      endcase
    end
  end

endmodule
