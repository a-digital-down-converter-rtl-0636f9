// chirp_ctrl -- pulse sequencer and LFM control logic.
//
// A linear-FM chirp has instantaneous frequency f(t) = f0 + k*t with
// k = B/Tp. In a DDS the frequency is the phase increment, so the chirp is
// made by adding a constant step to the increment on every sample:
//   pinc[n] = lfm_pinc0 + n * lfm_step,   0 <= n < pulse_len.
// On `start` (ignored while busy) the block emits capt_len valid samples
// back to back. The first carries `clr`, which restarts the phase of both
// DDSs so that the carrier is synchronous with the transmitted pulse. The
// first pulse_len samples carry `en`=1 (chirp on); the remaining ones have
// `en`=0, a zero-amplitude tail that flushes the decimation filters so the
// captured frame holds the whole filtered pulse.
//
// Timing: the first sample appears the cycle after `start`; `busy` is high
// while samples are emitted; `pulses` counts completed captures.
// The phase-increment ramp follows the LFM description; the capture tail,
// the restart flag and the counters are this design's choices.
module chirp_ctrl
  import ddc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [PHASE_W-1:0] lfm_pinc0,
  input  logic [PHASE_W-1:0] lfm_step,
  input  logic [31:0]        pulse_len,
  input  logic [31:0]        capt_len,
  output logic               busy,
  output logic [15:0]        pulses,
  output logic               s_valid,
  output logic               s_clr,
  output logic               s_en,
  output logic [PHASE_W-1:0] s_pinc
);

  logic [31:0]        n;
  logic [PHASE_W-1:0] pinc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      n      <= '0;
      pinc   <= '0;
      pulses <= '0;
    end else if (busy) begin
      n    <= n + 32'd1;
      pinc <= pinc + lfm_step;
      if (n == capt_len - 32'd1) begin
        busy   <= 1'b0;
        pulses <= pulses + 16'd1;
      end
    end else if (start && capt_len != 32'd0) begin
      busy <= 1'b1;
      n    <= '0;
      pinc <= lfm_pinc0;
    end
  end

  assign s_valid = busy;
  assign s_clr   = busy && (n == 32'd0);
  assign s_en    = busy && (n < pulse_len);
  assign s_pinc  = pinc;

endmodule
