// sine_dac_test: DAC bring-up design that plays one sine period in a loop.
//
// A ROM holds one period of a sine wave, N_POINTS unsigned 12-bit values
//   rom[k] = round(2048 + 2047 * sin(2*pi*k / N_POINTS)),
// computed at elaboration (a Taylor series in real arithmetic). Every
// STEP_DIV clocks the next value is sent to the DAC through dac_spi_tx, so
// the DAC output is a sine of frequency f_clk / (STEP_DIV * N_POINTS):
// 50 MHz / (2000 * 64) = 390.6 Hz by default. Playing a stored sine period
// to the DAC follows the design's DAC test; the table length, step rate and
// formula are this design's choices.
//
// Outputs: the DAC pins (see dac_spi_tx) and the ROM index of the value last
// sent, for observation.
module sine_dac_test #(
  parameter int unsigned N_POINTS = 64,
  parameter int unsigned STEP_DIV = 2000,
  parameter int unsigned SCK_HALF = 4,
  localparam int unsigned IW = $clog2(N_POINTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          dac_cs_n,
  output logic          spi_sck,
  output logic          spi_mosi,
  output logic          dac_clr_n,
  output logic [IW-1:0] index
);

  if (STEP_DIV < 70 * SCK_HALF) begin : g_rate_check
    $error("sine_dac_test: STEP_DIV too small for one DAC transfer");
  end

  typedef logic [11:0] rom_t [N_POINTS];

  function automatic real sine(real a);
    // reduce to [-pi, pi], then sum the Taylor series
    real pi, term, sum;
    pi = 3.14159265358979323846;
    while (a > pi)  a = a - 2.0 * pi;
    while (a < -pi) a = a + 2.0 * pi;
    term = a;
    sum  = a;
    for (int n = 1; n < 12; n++) begin
      term = -term * a * a / real'((2 * n) * (2 * n + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic rom_t make_rom();
    rom_t r;
    for (int k = 0; k < N_POINTS; k++) begin
      real v;
      v = 2048.0 + 2047.0 * sine(2.0 * 3.14159265358979323846 * real'(k) / real'(N_POINTS));
      r[k] = 12'($rtoi(v + 0.5));
    end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  localparam int unsigned DW = $clog2(STEP_DIV);

  logic [DW-1:0] step_cnt;
  logic [IW-1:0] next_idx;
  logic          strobe;
  logic [11:0]   value;
  logic          busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt <= '0;
      next_idx <= '0;
      index    <= '0;
      strobe   <= 1'b0;
      value    <= '0;
    end else begin
      strobe   <= 1'b0;
      step_cnt <= (step_cnt == DW'(STEP_DIV - 1)) ? '0 : step_cnt + 1'b1;
      if (step_cnt == '0) begin
        value    <= ROM[next_idx];
        index    <= next_idx;
        strobe   <= 1'b1;
        next_idx <= (next_idx == IW'(N_POINTS - 1)) ? '0 : next_idx + 1'b1;
      end
    end
  end

  dac_spi_tx #(.SCK_HALF(SCK_HALF)) u_dac (
    .clk       (clk),
    .rst_n     (rst_n),
    .data_valid(strobe),
    .data      (value),
    .busy      (busy),
    .dac_cs_n  (dac_cs_n),
    .spi_sck   (spi_sck),
    .spi_mosi  (spi_mosi),
    .dac_clr_n (dac_clr_n)
  );

endmodule
