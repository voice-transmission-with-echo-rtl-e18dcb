// effect_unit: echo and reverb on a stream of 12-bit signed samples.
//
// Every input sample x[n] is written into a circular delay memory
// (delay_ram, 4096 x 12) and mixed with delayed samples read back from it:
//   echo   (ECHO_M1/ECHO_M2):     y[n] = x[n] + x[n-D]
//   reverb (REVERB_M1/REVERB_M2): y[n] = x[n] + x[n-D1]/2 + x[n-D2]/4
//                                        + x[n-D3]/8 + x[n-D4]/16
// The delays and gains come from voice_pkg (tap_delay, tap_shift); the echo
// gain of 1 and the reverb gains of 1/2..1/16 and the delay values follow the
// design's echo and reverb tables. The taps are read one after another from
// the single-port-read memory, one tap every two clocks, so a sample takes
// at most 2*NTAPS+2 clocks, far below the sample period. Gains are
// arithmetic right shifts. The sum is saturated to 12 bits (this design's
// choice; the gain-1 echo could otherwise overflow).
//
// After reset the memory is cleared, one word per clock (DEPTH clocks), so
// the first delayed copies are silence; in_ready is low meanwhile and samples
// offered then are dropped. The mode is sampled when a sample is accepted.
//
// Interface: in_valid/in_sample is a one-clock strobe with its sample;
// out_valid pulses for one clock with out_sample. Latency from in_valid to
// out_valid is 2*taps+2 clocks (4 for echo, 10 for reverb).
module effect_unit
  import voice_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  effect_mode_t mode,
  input  logic         in_valid,
  input  sample_t      in_sample,
  output logic         in_ready,
  output logic         out_valid,
  output sample_t      out_sample
);

  localparam int unsigned ACC_W = SAMPLE_W + 3;
  localparam logic signed [ACC_W-1:0] SAT_MAX = ACC_W'(2**(SAMPLE_W-1) - 1);
  localparam logic signed [ACC_W-1:0] SAT_MIN = -ACC_W'(2**(SAMPLE_W-1));

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_READ, S_ACC, S_WRITE} state_t;

  state_t                   state;
  logic [AW-1:0]            wp;        // next write address
  logic [AW-1:0]            clr_addr;
  logic [1:0]               tap;
  effect_mode_t             cur_mode;
  sample_t                  x;
  logic signed [ACC_W-1:0]  acc;

  logic                     ram_we;
  logic [AW-1:0]            ram_waddr, ram_raddr;
  logic [SAMPLE_W-1:0]      ram_wdata, ram_rdata;

  delay_ram #(.DEPTH(DEPTH), .WIDTH(SAMPLE_W)) u_ram (
    .clk  (clk),
    .we   (ram_we),
    .waddr(ram_waddr),
    .wdata(ram_wdata),
    .raddr(ram_raddr),
    .rdata(ram_rdata)
  );

  // Tap read address: D samples behind the write pointer (wraps around).
  always_comb begin
    ram_raddr = wp - AW'(tap_delay(cur_mode, 32'(tap)));
    ram_we    = 1'b0;
    ram_waddr = wp;
    ram_wdata = x;
    if (state == S_CLEAR) begin
      ram_we    = 1'b1;
      ram_waddr = clr_addr;
      ram_wdata = '0;
    end else if (state == S_WRITE) begin
      ram_we = 1'b1;
    end
  end

  // Delayed sample scaled by the tap gain (arithmetic shift).
  logic signed [ACC_W-1:0] tap_term;
  always_comb begin
    tap_term = ACC_W'(signed'(ram_rdata)) >>> tap_shift(cur_mode, 32'(tap));
  end

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CLEAR;
      wp         <= '0;
      clr_addr   <= '0;
      tap        <= '0;
      cur_mode   <= ECHO_M1;
      x          <= '0;
      acc        <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == AW'(DEPTH - 1)) state <= S_IDLE;
        end
        S_IDLE: if (in_valid) begin
          x        <= in_sample;
          acc      <= ACC_W'(in_sample);
          cur_mode <= mode;
          tap      <= '0;
          state    <= S_READ;
        end
        S_READ: state <= S_ACC;          // address presented, data next clock
        S_ACC: begin
          acc <= acc + tap_term;
          if (32'(tap) + 1 < tap_count(cur_mode)) begin
            tap   <= tap + 1'b1;
            state <= S_READ;
          end else begin
            state <= S_WRITE;
          end
        end
        S_WRITE: begin
          wp         <= wp + 1'b1;
          out_valid  <= 1'b1;
          out_sample <= (acc > SAT_MAX) ? sample_t'(SAT_MAX) :
                        (acc < SAT_MIN) ? sample_t'(SAT_MIN) : sample_t'(acc);
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Every delay must lie inside the memory.
  if (tap_delay(ECHO_M1, 0) >= DEPTH || tap_delay(REVERB_M1, NTAPS-1) >= DEPTH)
  begin : g_depth_check
    $error("effect_unit: DEPTH too small for the effect delays");
  end

endmodule
