// frame_tx: frame generator and serial transmitter of the master FPGA.
//
// Each 12-bit sample handed in is wrapped in a 28-bit frame and shifted out
// MSB first: fifteen ones, one zero, then the twelve data bits (MSB first).
// Between frames the data line idles low. The frame layout follows the
// design's frame structure; bit order and idle clocking are this design's
// choices.
//
// The link clock link_clk runs continuously with a period of 2*CLK_HALF
// system clocks (1 MHz at 50 MHz by default). link_data changes right after
// the falling edge of link_clk and is stable at the rising edge, where the
// receiver samples it. A sample offered with data_valid is latched when
// ready is high; the frame starts at the next falling edge and ends 28 link
// clocks later, when ready rises again. A sample offered while ready is low
// is dropped and counted in drops (saturating).
module frame_tx
  import voice_pkg::*;
#(
  parameter int unsigned CLK_HALF = 25
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                data_valid,
  input  logic [SAMPLE_W-1:0] data,
  output logic                ready,
  output logic                link_clk,
  output logic                link_data,
  output logic [7:0]          drops
);

  localparam int unsigned HW = (CLK_HALF > 1) ? $clog2(CLK_HALF) : 1;

  logic [HW-1:0]        half_cnt;
  logic                 pending;     // frame waiting for the next falling edge
  logic                 sending;
  logic [FRAME_W-1:0]   shreg;
  logic [4:0]           bits_left;

  wire half_done = (half_cnt == HW'(CLK_HALF - 1));
  wire fall      = half_done && link_clk;   // link_clk goes low now

  assign ready = !pending && !sending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_cnt  <= '0;
      link_clk  <= 1'b0;
      link_data <= 1'b0;
      pending   <= 1'b0;
      sending   <= 1'b0;
      shreg     <= '0;
      bits_left <= '0;
      drops     <= '0;
    end else begin
      half_cnt <= half_done ? '0 : half_cnt + 1'b1;
      if (half_done) link_clk <= !link_clk;

      if (data_valid) begin
        if (ready) begin
          shreg   <= {SYNC_PATTERN, data};
          pending <= 1'b1;
        end else if (drops != 8'hFF) begin
          drops <= drops + 1'b1;
        end
      end

      if (fall) begin
        if (pending) begin
          pending   <= 1'b0;
          sending   <= 1'b1;
          link_data <= shreg[FRAME_W-1];
          shreg     <= {shreg[FRAME_W-2:0], 1'b0};
          bits_left <= 5'(FRAME_W - 1);
        end else if (sending && bits_left != '0) begin
          link_data <= shreg[FRAME_W-1];
          shreg     <= {shreg[FRAME_W-2:0], 1'b0};
          bits_left <= bits_left - 1'b1;
        end else begin
          sending   <= 1'b0;
          link_data <= 1'b0;
        end
      end
    end
  end

endmodule
