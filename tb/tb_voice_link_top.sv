// tb_voice_link_top: the whole link at its default sizes, from the ADC pins
// of the master to the DAC pins of the slave. The two FPGAs run on clocks of
// 50 MHz and 49.02 MHz. Random full-scale values drive ADC channel 0 through
// the LTC1407A-1 model; the LTC2624 model on the slave's DAC pins collects
// the output. Each DAC code is compared with the reference effect (echo or
// reverb per mode) applied to the samples the chain should keep (previous
// conversion, upper 12 bits, every second one), converted to offset binary.
// The run covers 4300 processed samples (0.344 s of audio) so that even the
// 0.32 s echo is heard, and switches ECHO_M2 -> REVERB_M2 -> REVERB_M1 ->
// ECHO_M1. It also checks the 25 kHz AD_CONV rate and runs the sine DAC test
// alongside. Each mechanism is counted and must occur: memory clear,
// down-sampling, echo and reverb taps, saturation, mode switches, frame
// synchronisation, DAC updates and sine test updates.
module tb_voice_link_top;
  import voice_pkg::*;
  import tb_ref_pkg::*;
  localparam int NFRAMES = 4300;

  logic clk_m = 0, clk_s = 0, rst_n = 0;
  effect_mode_t mode = ECHO_M2;
  logic ad_conv, adc_sck, adc_miso;
  logic dac_cs_n, dac_sck, dac_mosi, dac_clr_n, link_clk, link_data;
  logic fx_valid, rx_valid;
  sample_t fx_sample;
  logic [7:0] link_drops;
  logic [11:0] rx_data;
  logic [15:0] rx_frames;
  logic test_dac_cs_n, test_dac_sck, test_dac_mosi, test_dac_clr_n;
  logic [5:0] test_index;
  logic signed [13:0] ain0 = '0, ain1 = '0;
  int conversions;
  logic [11:0] dac_out [4], tdac_out [4];
  logic [31:0] last_word, tlast_word;
  int updates, bits, tupdates, tbits;

  int checks = 0, failures = 0;
  int conv_q[$], hist[$];
  int cur_mode = 1, nfr = 0, ndac = 0, dropped = 0, n_sat = 0, switches = 0;
  int echo_taps = 0, reverb_taps = 0;
  int exp_dac[$];
  int mode_seen[4] = '{0, 0, 0, 0};
  logic [27:0] win = '0;
  longint last_conv = -1;

  always #10 clk_m = ~clk_m;
  always #10.2 clk_s = ~clk_s;

  voice_link_top dut (.*);
  ltc1407a_model adc (.ad_conv, .spi_sck(adc_sck), .spi_miso(adc_miso), .ain0, .ain1, .conversions);
  ltc2624_model dac (.cs_n(dac_cs_n), .spi_sck(dac_sck), .spi_mosi(dac_mosi), .clr_n(dac_clr_n),
                     .dac_out, .last_word, .updates, .bits);
  ltc2624_model tdac (.cs_n(test_dac_cs_n), .spi_sck(test_dac_sck), .spi_mosi(test_dac_mosi),
                      .clr_n(test_dac_clr_n), .dac_out(tdac_out), .last_word(tlast_word),
                      .updates(tupdates), .bits(tbits));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000000) @(posedge clk_m);
    failures++;
    $display("watchdog expired after %0d frames", nfr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Samples offered while the effect memory is still being cleared after
  // reset are not processed; the reference history starts after them.
  always @(posedge clk_m)
    if (rst_n && dut.u_master.u_ds.out_valid && !dut.u_master.u_fx.in_ready) dropped++;

  // Analog input, sampling rate and the samples the chain should keep.
  initial begin
    forever begin
      @(posedge ad_conv);
      if (last_conv >= 0) chk(($time - last_conv) == 40000, "AD_CONV period 40 us");
      last_conv = $time;
      conv_q.push_back(int'(ain0));
      if ((conv_q.size() - 1) % 2 == 0) begin
        int k;
        k = conv_q.size() - 1;
        hist.push_back(((k == 0) ? 0 : conv_q[k - 1]) >>> 2);
      end
      #100 ain0 = 14'($urandom);
      ain1 = 14'($urandom);
    end
  end

  // Frames on the link give the order of samples and the mode each took.
  always @(posedge link_clk) if (rst_n) begin
    win = {win[26:0], link_data};
    if (win[27:12] == 16'b1111_1111_1111_1110) begin
      int e;
      if (nfr == 0) repeat (dropped) void'(hist.pop_front());
      e = fx_ref(hist, nfr, cur_mode);
      exp_dac.push_back((e + 2048) & 12'hFFF);
      if (fx_saturates(hist, nfr, cur_mode)) n_sat++;
      if (cur_mode < 2 && nfr >= delay_of(cur_mode, 0)) echo_taps++;
      if (cur_mode >= 2 && nfr >= delay_of(cur_mode, 0)) reverb_taps++;
      mode_seen[cur_mode]++;
      nfr++;
      if (nfr == 1700) cur_mode = 3;
      if (nfr == 2100) cur_mode = 2;
      if (nfr == 2400) cur_mode = 0;
      if (effect_mode_t'(cur_mode) != mode) switches++;
      mode <= effect_mode_t'(cur_mode);
    end
  end

  // Every DAC update must carry the next expected code.
  always @(posedge dac_cs_n) if (rst_n) begin
    #1;
    if (updates > ndac) begin
      chk(exp_dac.size() > 0, "DAC update without a frame");
      if (exp_dac.size() > 0) begin
        int e;
        e = exp_dac.pop_front();
        chk(int'(dac_out[0]) == e, $sformatf("DAC update %0d: %0d expected %0d", ndac, dac_out[0], e));
      end
      ndac = updates;
    end
  end

  initial begin
    repeat (3) @(posedge clk_m);
    rst_n <= 1;
    wait (nfr == NFRAMES);
    repeat (20000) @(posedge clk_m);
    chk(ndac == nfr && nfr >= NFRAMES, $sformatf("%0d DAC updates for %0d frames", ndac, nfr));
    chk(int'(rx_frames) == nfr, "slave frame counter");
    chk(link_drops == 0, "no sample dropped on the link");
    chk(conversions >= 2 * NFRAMES, "down-sampling: two conversions per frame");
    chk(dropped > 0, "memory clear happened");
    chk(echo_taps > 0 && reverb_taps > 0, "echo and reverb taps reached");
    chk(n_sat > 0, "saturation happened");
    chk(switches == 3, $sformatf("%0d mode switches", switches));
    for (int m = 0; m < 4; m++) chk(mode_seen[m] > 0, $sformatf("mode %0d ran", m));
    chk(tupdates > 100 && tbits == 32, "sine test updates");
    $display("conversions %0d frames %0d dac %0d dropped-at-clear %0d saturated %0d",
             conversions, nfr, ndac, dropped, n_sat);
    $display("echo samples with delayed copy %0d reverb %0d switches %0d sine updates %0d",
             echo_taps, reverb_taps, switches, tupdates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
