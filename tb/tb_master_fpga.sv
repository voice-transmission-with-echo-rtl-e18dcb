// tb_master_fpga: the master FPGA from ADC pins to link wires. Random
// full-scale values on ADC channel 0 go in through the LTC1407A-1 model;
// the link is decoded here (bits at rising link clock edges, frames found by
// their 15 ones and a zero) and every frame is compared with the reference
// effect applied to the ADC values the chain should keep: the previous
// conversion's channel 0 (one-sample ADC latency), upper 12 bits, every
// second sample. The mode runs ECHO_M2, REVERB_M2, REVERB_M1 and ECHO_M1.
// Parameters are reduced for speed: 300 clocks per ADC sample and a 5-clock
// link half period; the delay memory keeps its full size.
module tb_master_fpga;
  import voice_pkg::*;
  import tb_ref_pkg::*;
  localparam int NFRAMES = 4600;

  logic clk = 0, rst_n = 0;
  effect_mode_t mode = ECHO_M2;
  logic ad_conv, adc_sck, adc_miso, link_clk, link_data, fx_valid;
  sample_t fx_sample;
  logic [7:0] link_drops;
  logic signed [13:0] ain0 = '0, ain1 = '0;
  int conversions;
  int checks = 0, failures = 0, nfr = 0, n_sat = 0;
  int conv_q[$];        // channel 0 value at each conversion
  int hist[$];          // samples the effect unit should see
  int modes[$];
  int cur_mode = 1;
  int mode_seen[4] = '{0, 0, 0, 0};
  logic [27:0] win = '0;
  int dropped = 0;

  // Samples offered while the effect unit still clears its memory after
  // reset are not processed; the reference history starts after them.
  always @(posedge clk)
    if (rst_n && dut.u_ds.out_valid && !dut.u_fx.in_ready) dropped++;

  always #10 clk = ~clk;

  master_fpga #(.SAMPLE_DIV(300), .LINK_HALF(5)) dut (
    .clk, .rst_n, .mode, .ad_conv, .adc_sck, .adc_miso, .link_clk, .link_data,
    .fx_valid, .fx_sample, .link_drops);
  ltc1407a_model adc (.ad_conv, .spi_sck(adc_sck), .spi_miso(adc_miso), .ain0, .ain1, .conversions);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3500000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d frames", nfr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Analog input and the sample sequence the chain should keep.
  initial begin
    forever begin
      @(posedge ad_conv);
      conv_q.push_back(int'(ain0));
      // result k (from conversion k-1) is kept when k is even
      if ((conv_q.size() - 1) % 2 == 0) begin
        int k, v;
        k = conv_q.size() - 1;
        v = (k == 0) ? 0 : conv_q[k - 1];
        hist.push_back(v >>> 2);
      end
      #100 ain0 = 14'($urandom);
      ain1 = 14'($urandom);
    end
  end

  // Link decoder and comparison.
  always @(posedge link_clk) if (rst_n) begin
    win = {win[26:0], link_data};
    if (win[27:12] == 16'b1111_1111_1111_1110) begin
      int e;
      logic signed [11:0] g;
      if (nfr == 0) repeat (dropped) void'(hist.pop_front());
      g = win[11:0];
      modes.push_back(cur_mode);
      e = fx_ref(hist, nfr, cur_mode);
      chk(int'(g) == e, $sformatf("frame %0d mode %0d: %0d expected %0d", nfr, cur_mode, g, e));
      if (fx_saturates(hist, nfr, cur_mode)) n_sat++;
      mode_seen[cur_mode]++;
      nfr++;
      // switch mode between frames; the next sample takes the new mode
      if (nfr == 1800) cur_mode = 3;
      if (nfr == 2400) cur_mode = 2;
      if (nfr == 2800) cur_mode = 0;
      mode <= effect_mode_t'(cur_mode);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nfr == NFRAMES);
    chk(link_drops == 0, "no sample dropped on the link");
    chk(dropped > 0 && dropped < 10, $sformatf("%0d samples dropped during the clear", dropped));
    for (int m = 0; m < 4; m++) chk(mode_seen[m] > 0, $sformatf("mode %0d never ran", m));
    chk(n_sat > 0, "saturation never happened");
    $display("frames %0d saturated %0d modes %0d/%0d/%0d/%0d", nfr, n_sat,
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
