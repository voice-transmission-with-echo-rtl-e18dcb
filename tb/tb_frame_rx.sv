// tb_frame_rx: drives the receiver with a link clock of its own rate
// (period 26 clocks) and frames of random data, sent back to back, after
// idle gaps, or with a damaged pattern. The expected frames come from the
// bit stream as sent: wherever 15 ones and a zero are followed by 12 bits,
// those 12 bits must come out once, in order. Intact frames must all come
// out, a damaged one may only come out shifted; the frame counter must agree.
module tb_frame_rx;
  logic clk = 0, rst_n = 0;
  logic link_clk = 0, link_data = 0;
  logic data_valid;
  logic [11:0] data;
  logic [15:0] frames;
  int checks = 0, failures = 0, got = 0, sent_good = 0, sent_bad = 0;
  logic [11:0] exp_q[$];

  always #10 clk = ~clk;

  frame_rx dut (.*);

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

  // one link bit: data set while the clock is low, clock high for 13 clocks
  logic [27:0] sent_win = '0;
  task automatic link_bit(logic b);
    sent_win = {sent_win[26:0], b};
    if (sent_win[27:12] == 16'b1111_1111_1111_1110) exp_q.push_back(sent_win[11:0]);
    link_data <= b;
    repeat (13) @(posedge clk);
    link_clk <= 1;
    repeat (13) @(posedge clk);
    link_clk <= 0;
  endtask

  task automatic send_frame(logic [11:0] v, int damage);
    logic [27:0] f;
    f = {15'h7FFF, 1'b0, v};
    if (damage >= 0) f[27 - damage] = ~f[27 - damage];
    for (int i = 27; i >= 0; i--) link_bit(f[i]);
  endtask

  always @(posedge clk) if (rst_n && data_valid) begin
    chk(exp_q.size() > 0, "unexpected frame");
    if (exp_q.size() > 0) begin
      logic [11:0] e;
      e = exp_q.pop_front();
      chk(data == e, $sformatf("data %h expected %h", data, e));
    end
    got++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) link_bit(0);
    for (int i = 0; i < 60; i++) begin
      logic [11:0] v;
      int dmg;
      v = 12'($urandom);
      if (i % 10 == 3) v = 12'hFFF;                 // data of all ones
      dmg = (i % 7 == 5) ? int'($urandom % 16) : -1;
      if (dmg < 0) sent_good++;
      else sent_bad++;
      send_frame(v, dmg);
      if (i % 3 == 0) repeat ($urandom % 8) link_bit(0);   // idle gap
    end
    repeat (4) link_bit(0);
    chk(got >= sent_good && got < sent_good + sent_bad + 1,
        $sformatf("%0d frames taken, %0d intact sent", got, sent_good));
    chk(frames == 16'(got), "frame counter");
    chk(exp_q.size() == 0, "frames missing");
    $display("good %0d damaged %0d", sent_good, sent_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
