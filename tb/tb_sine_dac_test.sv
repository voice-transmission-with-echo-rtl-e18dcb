// tb_sine_dac_test: runs the DAC bring-up design for two sine periods
// against the LTC2624 model. Each DAC A value must match
// 2048 + 2047*sin(2*pi*k/64) (computed here with $sin, within one code),
// the points must come in order and wrap after 64, and updates must come
// every 2000 clocks (a 390.6 Hz sine at 50 MHz).
module tb_sine_dac_test;
  logic clk = 0, rst_n = 0;
  logic dac_cs_n, spi_sck, spi_mosi, dac_clr_n;
  logic [5:0] index;
  logic [11:0] dac_out [4];
  logic [31:0] last_word;
  int updates, bits;
  int checks = 0, failures = 0, n = 0, exact = 0;
  longint last_t = -1;

  always #10 clk = ~clk;

  sine_dac_test dut (.*);
  ltc2624_model dac (.cs_n(dac_cs_n), .spi_sck, .spi_mosi, .clr_n(dac_clr_n),
                     .dac_out, .last_word, .updates, .bits);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dac_cs_n) if (rst_n) begin
    real e;
    int ei, got;
    #1;
    e  = 2048.0 + 2047.0 * $sin(2.0 * 3.141592653589793 * real'(n % 64) / 64.0);
    ei = $rtoi(e + 0.5);
    got = int'(dac_out[0]);
    chk(got >= ei - 1 && got <= ei + 1, $sformatf("point %0d: %0d expected %0d", n, got, ei));
    if (got == ei) exact++;
    chk(int'(index) == n % 64, "index");
    if (last_t >= 0) chk(($time - last_t) == 2000 * 20, "update period");
    last_t = $time;
    n++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n == 130);
    chk(exact >= 120, $sformatf("only %0d exact", exact));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
