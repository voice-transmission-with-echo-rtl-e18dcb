// tb_delay_ram: fills the whole 4096 x 12 memory with random words, reads
// every word back (one-clock read latency), then checks that a read of the
// address being written returns the old word.
module tb_delay_ram;
  logic clk = 0;
  logic we = 0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [11:0] wdata = '0, rdata;
  logic [11:0] ref_mem [4096];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  delay_ram dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < 4096; a++) begin
      ref_mem[a] = 12'($urandom);
      we <= 1; waddr <= 12'(a); wdata <= ref_mem[a];
      @(posedge clk);
    end
    we <= 0;
    for (int a = 0; a < 4096; a++) begin
      int r;
      r = $urandom % 4096;
      raddr <= 12'(r);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== ref_mem[r]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h expected %h", r, rdata, ref_mem[r]);
      end
    end
    // read during write of the same address gives the old word
    for (int i = 0; i < 50; i++) begin
      int a;
      logic [11:0] nw;
      a = $urandom % 4096; nw = 12'($urandom);
      we <= 1; waddr <= 12'(a); wdata <= nw; raddr <= 12'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("read-during-write addr %0d", a); end
      ref_mem[a] = nw;
      we <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== nw) begin failures++; $display("write addr %0d lost", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
