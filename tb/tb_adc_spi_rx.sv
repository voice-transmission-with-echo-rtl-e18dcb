// tb_adc_spi_rx: drives the ADC receive block with the LTC1407A-1 model.
// Random values are applied to both analog inputs before each conversion;
// each result must equal the values of the previous conversion (one-sample
// latency), sample must be the upper 12 bits of channel 0, and results must
// come exactly SAMPLE_DIV clocks apart (25 kHz at 50 MHz).
module tb_adc_spi_rx;
  logic clk = 0, rst_n = 0;
  logic ad_conv, spi_sck, spi_miso, valid;
  logic signed [13:0] ch0, ch1, ain0, ain1;
  logic signed [11:0] sample;
  int conversions;
  int checks = 0, failures = 0;
  logic signed [13:0] q0[$], q1[$];
  longint last_t = -1;
  int n_valid = 0;

  always #10 clk = ~clk;

  adc_spi_rx dut (.*);
  ltc1407a_model adc (.ad_conv, .spi_sck, .spi_miso, .ain0, .ain1, .conversions);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new analog values for every conversion; remember what was sampled
  initial begin
    q0.push_back(0); q1.push_back(0);     // converter powers up holding 0
    ain0 = 14'($urandom); ain1 = 14'($urandom);
    forever begin
      @(posedge ad_conv);
      q0.push_back(ain0); q1.push_back(ain1);
      #100;
      ain0 = 14'($urandom); ain1 = 14'($urandom);
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (valid) begin
    logic signed [13:0] e0, e1;
    e0 = q0.pop_front(); e1 = q1.pop_front();
    chk(ch0 == e0, $sformatf("ch0 %0d exp %0d", ch0, e0));
    chk(ch1 == e1, $sformatf("ch1 %0d exp %0d", ch1, e1));
    chk(sample == e0[13:2], "sample = ch0[13:2]");
    if (last_t >= 0) chk(($time - last_t) == 2000 * 20, $sformatf("period %0t", $time - last_t));
    last_t = $time;
    n_valid++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_valid == 40);
    chk(conversions >= 40, "conversions counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
