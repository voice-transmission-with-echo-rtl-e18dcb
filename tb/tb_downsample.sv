// tb_downsample: random input strobes; the block must pass the 1st, 3rd,
// 5th ... sample unchanged, one clock later, and drop the others.
module tb_downsample;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [11:0] in_data = '0, out_data;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  logic [11:0] exp_q[$];
  logic        exp_next = 0;

  always #10 clk = ~clk;

  downsample dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== exp_next) begin
      failures++;
      if (failures < 10) $display("out_valid %0b expected %0b", out_valid, exp_next);
    end
    if (out_valid && exp_next) begin
      logic [11:0] e;
      e = exp_q.pop_front();
      checks++;
      if (out_data !== e) begin failures++; $display("data %h expected %h", out_data, e); end
      n_out++;
    end
    exp_next = rst_n && in_valid && (n_in % 2 == 0);
    if (rst_n && in_valid) begin
      if (n_in % 2 == 0) exp_q.push_back(in_data);
      n_in++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2000) begin
      @(posedge clk);
      in_valid <= ($urandom % 3 == 0);
      in_data  <= 12'($urandom);
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != (n_in + 1) / 2) begin failures++; $display("%0d out of %0d", n_out, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
