// tb_dac_spi_tx: sends random samples to the LTC2624 model. Checks that
// each transfer has 32 SCK edges, that the word carries don't-care zeros,
// command 0011, address 0000 and the data, that DAC A takes the value, that
// DAC_CS stays low for 65*SCK_HALF clocks and that a sample offered while busy
// is ignored. Also checks that the DAC is held cleared during reset.
module tb_dac_spi_tx;
  logic clk = 0, rst_n = 0;
  logic data_valid = 0, busy, dac_cs_n, spi_sck, spi_mosi, dac_clr_n;
  logic [11:0] data = '0;
  logic [11:0] dac_out [4];
  logic [31:0] last_word;
  int updates, bits;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  dac_spi_tx dut (.*);
  ltc2624_model dac (.cs_n(dac_cs_n), .spi_sck, .spi_mosi, .clr_n(dac_clr_n),
                     .dac_out, .last_word, .updates, .bits);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 chk(dac_clr_n == 0, "clear held in reset");
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 100; i++) begin
      logic [11:0] v;
      longint t0, t1;
      int u0;
      v = 12'($urandom);
      if (i == 0) v = 12'h000;
      if (i == 1) v = 12'hFFF;
      u0 = updates;
      data_valid <= 1; data <= v;
      @(posedge clk);
      t0 = $time;
      data_valid <= 1; data <= ~v;                // ignored: busy
      @(posedge clk);
      data_valid <= 0;
      @(posedge dac_cs_n);
      t1 = $time;
      #1;
      chk(updates == u0 + 1, "one update");
      chk(bits == 32, $sformatf("%0d bits", bits));
      chk(last_word == {8'h00, 4'b0011, 4'b0000, v, 4'h0}, $sformatf("word %h", last_word));
      chk(dac_out[0] == v, $sformatf("DAC A %h expected %h", dac_out[0], v));
      chk((t1 - t0) / 20 == 65 * 4, $sformatf("transfer %0d clocks", (t1 - t0) / 20));
      chk(dac_clr_n == 1, "clear released");
      @(posedge clk);
      #1 chk(!busy, "idle after transfer");
      repeat ($urandom % 10) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
