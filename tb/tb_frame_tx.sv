// tb_frame_tx: sends random samples through the frame transmitter and
// decodes the link independently: bits are taken at rising link clock
// edges and a frame is recognised by 15 ones and a zero. Checks the data
// and order of every frame, the link clock period (2*CLK_HALF clocks), that
// the line carries no other ones (idle low), and that a sample offered while
// a frame is in flight is dropped and counted.
module tb_frame_tx;
  localparam logic [15:0] PATTERN = 16'b1111_1111_1111_1110;
  logic clk = 0, rst_n = 0;
  logic data_valid = 0, ready, link_clk, link_data;
  logic [11:0] data = '0;
  logic [7:0] drops;
  int checks = 0, failures = 0;
  logic [11:0] exp_q[$];
  logic [27:0] win = '0;
  int ones_seen = 0, ones_exp = 0, frames = 0, exp_drops = 0;
  longint last_rise = -1;

  always #10 clk = ~clk;

  frame_tx dut (.*);

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

  always @(posedge link_clk) if (rst_n) begin
    if (last_rise >= 0) chk(($time - last_rise) == 50 * 20, "link clock period");
    last_rise = $time;
    win = {win[26:0], link_data};
    if (link_data) ones_seen++;
    if (win[27:12] == PATTERN) begin
      chk(exp_q.size() > 0, "unexpected frame");
      if (exp_q.size() > 0) begin
        logic [11:0] e;
        e = exp_q.pop_front();
        chk(win[11:0] == e, $sformatf("frame data %h expected %h", win[11:0], e));
      end
      frames++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [11:0] v;
      #1 wait (ready);
      @(posedge clk);
      v = 12'($urandom);
      data_valid <= 1; data <= v;
      exp_q.push_back(v);
      ones_exp += 15 + $countones(v);
      @(posedge clk);
      if (i % 4 == 1) begin          // offer another one while busy
        data <= ~v;
        exp_drops++;
        @(posedge clk);
      end
      data_valid <= 0;
      repeat ($urandom % 200) @(posedge clk);
    end
    #1 wait (ready);
    repeat (200) @(posedge clk);
    chk(frames == 40, $sformatf("%0d frames", frames));
    chk(exp_q.size() == 0, "frames missing");
    chk(ones_seen == ones_exp, $sformatf("ones on the line %0d expected %0d", ones_seen, ones_exp));
    chk(drops == 8'(exp_drops), $sformatf("drops %0d expected %0d", drops, exp_drops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
