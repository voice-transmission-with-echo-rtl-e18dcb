// downsample: decimates a sample stream by FACTOR.
//
// Of every FACTOR input samples (marked by in_valid) the first is passed on
// and the others are dropped, so the delay line behind it fills at the ADC
// rate divided by FACTOR. The output is registered: out_valid pulses for one
// clock, one clock after the in_valid it passes on. The default FACTOR of two
// takes the 25 kHz ADC stream to the 12.5 kHz at which the effect delays are
// counted; the factor and the keep-one-drop-the-rest method are this
// design's own reading of the down-sampling step, no filter is applied.
module downsample #(
  parameter int unsigned FACTOR = 2,
  parameter int unsigned WIDTH  = 12,
  localparam int unsigned CW = (FACTOR > 1) ? $clog2(FACTOR) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  logic [CW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (phase == CW'(0)) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end
        phase <= (phase == CW'(FACTOR - 1)) ? '0 : phase + 1'b1;
      end
    end
  end

endmodule
