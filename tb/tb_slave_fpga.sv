// tb_slave_fpga: sends frames of random signed samples over the link (link
// clock period 50 slave clocks) and checks, with the LTC2624 model, that
// each one reaches DAC output A once, converted to offset binary (sign bit
// inverted), and that the frame counter agrees.
module tb_slave_fpga;
  logic clk = 0, rst_n = 0;
  logic link_clk = 0, link_data = 0;
  logic dac_cs_n, dac_sck, dac_mosi, dac_clr_n, rx_valid;
  logic [11:0] rx_data;
  logic [15:0] rx_frames;
  logic [11:0] dac_out [4];
  logic [31:0] last_word;
  int updates, bits;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  slave_fpga dut (.*);
  ltc2624_model dac (.cs_n(dac_cs_n), .spi_sck(dac_sck), .spi_mosi(dac_mosi), .clr_n(dac_clr_n),
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

  task automatic link_bit(logic b);
    link_data <= b;
    repeat (25) @(posedge clk);
    link_clk <= 1;
    repeat (25) @(posedge clk);
    link_clk <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) link_bit(0);
    for (int i = 0; i < 80; i++) begin
      logic [11:0] v;
      logic [27:0] f;
      int u0;
      v = 12'($urandom);
      if (i == 0) v = 12'h800;       // most negative -> DAC code 0
      if (i == 1) v = 12'h7FF;       // most positive -> DAC code 4095
      u0 = updates;
      f = {16'hFFFE, v};
      for (int b = 27; b >= 0; b--) link_bit(f[b]);
      repeat (8) link_bit(0);     // DAC transfer time
      chk(updates == u0 + 1, "one DAC update per frame");
      chk(dac_out[0] == {~v[11], v[10:0]},
          $sformatf("DAC A %h for sample %h", dac_out[0], v));
      chk(int'(rx_frames) == i + 1, "frame counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
