// frame_rx: serial receiver and frame decoder of the slave FPGA.
//
// The link clock and data arrive from the master FPGA, which runs on its own
// clock, so both pass a two-flop synchronizer first. On every rising edge of
// the link clock the data bit is shifted into a 28-bit register. When the
// upper 16 bits of that register hold the frame pattern (fifteen ones and a
// zero), the lower 12 bits are a complete sample: data is updated and
// data_valid pulses for one clock. The 28-bit register and the check of its
// upper 16 bits follow the design's receiver description; the synchronizer
// is this design's addition. Because the data field is shorter than the
// pattern and the pattern ends in the only zero of its 16 bits, a run of
// frames sent back to back or separated by low idle bits cannot produce a
// false match; a bit error in the pattern makes the frame be skipped.
//
// The link clock must be slower than clk/4 (its halves at least two clocks
// long). data_valid comes 3 clocks after the rising link clock edge that
// carries the last data bit. frames counts the frames taken (wraps).
module frame_rx
  import voice_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                link_clk,
  input  logic                link_data,
  output logic                data_valid,
  output logic [SAMPLE_W-1:0] data,
  output logic [15:0]         frames
);

  logic [2:0]         clk_sync;    // two sync stages plus one for the edge
  logic [1:0]         dat_sync;
  logic [FRAME_W-1:0] shreg;

  wire                rise      = clk_sync[1] && !clk_sync[2];
  wire [FRAME_W-1:0]  shreg_nxt = {shreg[FRAME_W-2:0], dat_sync[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync   <= '0;
      dat_sync   <= '0;
      shreg      <= '0;
      data_valid <= 1'b0;
      data       <= '0;
      frames     <= '0;
    end else begin
      clk_sync   <= {clk_sync[1:0], link_clk};
      dat_sync   <= {dat_sync[0], link_data};
      data_valid <= 1'b0;
      if (rise) begin
        shreg <= shreg_nxt;
        if (shreg_nxt[FRAME_W-1 -: SYNC_W] == SYNC_PATTERN) begin
          data       <= shreg_nxt[SAMPLE_W-1:0];
          data_valid <= 1'b1;
          frames     <= frames + 1'b1;
        end
      end
    end
  end

endmodule
