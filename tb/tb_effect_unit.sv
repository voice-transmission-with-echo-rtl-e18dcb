// tb_effect_unit: checks echo and reverb sample by sample against the
// reference model, in all four modes, with full-range random input so that
// the saturation is exercised. Also checks the memory clear after reset
// (first echoes are silent), the latency (4 clocks echo, 10 clocks reverb)
// and that in_ready is low while the unit is busy.
module tb_effect_unit;
  import voice_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  effect_mode_t mode;
  logic in_valid, in_ready, out_valid;
  sample_t in_sample, out_sample;
  int checks = 0, failures = 0;
  int hist[$];
  int modes[$];
  int n_out = 0, n_sat = 0;
  int mode_seen[4] = '{0, 0, 0, 0};
  longint t_in;

  always #10 clk = ~clk;

  effect_unit dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    int exp_y; longint lat;
    exp_y = fx_ref(hist, n_out, modes[n_out]);
    lat   = ($time - t_in) / 20;
    checks++;
    if (out_sample !== sample_t'(exp_y)) begin
      failures++;
      if (failures < 10) $display("sample %0d mode %0d: got %0d expected %0d",
                                  n_out, modes[n_out], out_sample, exp_y);
    end
    checks++;
    if (lat != ((modes[n_out] < 2) ? 4 : 10)) begin
      failures++;
      if (failures < 10) $display("sample %0d: latency %0d", n_out, lat);
    end
    if (fx_saturates(hist, n_out, modes[n_out])) n_sat++;
    mode_seen[modes[n_out]]++;
    n_out++;
  end

  task automatic send(int m, logic signed [11:0] v);
    mode      <= effect_mode_t'(m);
    in_sample <= sample_t'(v);
    in_valid  <= 1'b1;
    hist.push_back(v);
    modes.push_back(m);
    @(posedge clk);
    t_in = $time;
    in_valid <= 1'b0;
    #1;
    // the unit is now busy and refuses input
    checks++;
    if (in_ready) begin failures++; $display("in_ready high while busy"); end
    repeat (11) @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_sample = '0; mode = ECHO_M1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (in_ready) begin failures++; $display("in_ready during clear"); end
    wait (in_ready);
    @(posedge clk);
    for (int i = 0; i < 4200; i++) send(0, $signed(12'($urandom)));
    for (int i = 0; i < 1800; i++) send(1, $signed(12'($urandom)));
    for (int i = 0; i < 1700; i++) send(3, $signed(12'($urandom)));
    for (int i = 0; i < 800; i++)  send(2, $signed(12'($urandom)));
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != hist.size()) begin failures++; $display("outputs %0d of %0d", n_out, hist.size()); end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("mode %0d never ran", m); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never happened"); end
    $display("outputs %0d, saturated %0d", n_out, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
