// dds -- direct digital synthesizer producing a complex exponential.
//
// A PHASE_W-bit phase accumulator adds the per-sample phase increment `pinc`
// on every valid input. The top LUT_W bits of the phase address a
// quarter-wave sine table of 2^(LUT_W-2) entries; quadrant folding gives the
// full sine and cosine. Table entry i holds round(AMP * sin(2*pi*(i+0.5)/2^LUT_W)),
// the half-step offset making the four quadrants exact mirror images.
// With LUT_W = 12 the phase-truncation spurs sit near -72 dBc, in line with
// the roughly 70 dB SFDR the converter is meant to reach.
//
// The block is used twice: as the LFM (chirp) generator, whose increment
// changes every sample, and as the carrier NCO, whose increment is constant.
// Streaming the increment, and reading it every sample, is what turns a
// linear increment ramp into a linear-FM chirp.
//
// Interface: valid-only stream (no back-pressure). `in_clr` with `in_valid`
// restarts the phase at zero for that sample (pulse-synchronous carrier).
// `in_en` low forces the output to zero while the phase still advances.
// Timing: out_valid follows in_valid by 2 cycles. The output for the n-th
// sample after a restart has phase sum(pinc[0..n-1]).
// Table size, phase width and the enable/clear inputs are this design's
// choices; the two-DDS arrangement follows the converter's block diagram.
module dds
  import ddc_pkg::*;
#(
  parameter int unsigned PW    = PHASE_W, // phase accumulator width
  parameter int unsigned LUT_W = 12,      // phase bits used for the table
  parameter int unsigned AMP   = 32767    // peak amplitude
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_clr,
  input  logic          in_en,
  input  logic [PW-1:0] pinc,
  output logic          out_valid,
  output dds_sample_t   out_data
);

  localparam int unsigned QN = 2 ** (LUT_W - 2);   // quarter-wave entries
  typedef logic [DDS_W-1:0] qtab_t [QN];

  function automatic qtab_t make_table();
    qtab_t t;
    for (int i = 0; i < QN; i++) begin
      t[i] = DDS_W'($rtoi($floor(real'(AMP) *
             $sin(2.0 * 3.14159265358979323846 * (real'(i) + 0.5) / real'(4 * QN)) + 0.5)));
    end
    return t;
  endfunction

  localparam qtab_t QTAB = make_table();

  logic [PW-1:0] acc;
  logic [PW-1:0] phase;

  // Phase of the current sample: zero on a restart, else the accumulator.
  assign phase = in_clr ? '0 : acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (in_valid) begin
      acc <= phase + pinc;
    end
  end

  // Stage 1: split the table phase into quadrant and index.
  logic [1:0]       q_s1;
  logic [LUT_W-3:0] idx_s1;
  logic             v_s1, en_s1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_s1   <= 1'b0;
      en_s1  <= 1'b0;
      q_s1   <= '0;
      idx_s1 <= '0;
    end else begin
      v_s1   <= in_valid;
      en_s1  <= in_en;
      q_s1   <= phase[PW-1 -: 2];
      idx_s1 <= phase[PW-3 -: (LUT_W-2)];
    end
  end

  // Quadrant folding: sin uses quadrant q, cos uses quadrant q+1.
  function automatic logic signed [DDS_W-1:0] fold(input logic [1:0] q,
                                                   input logic [LUT_W-3:0] idx);
    logic [DDS_W-1:0] m;
    m = q[0] ? QTAB[~idx] : QTAB[idx];
    return q[1] ? -$signed(m) : $signed(m);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v_s1;
      if (en_s1) begin
        out_data.im <= fold(q_s1, idx_s1);
        out_data.re <= fold(q_s1 + 2'd1, idx_s1);
      end else begin
        out_data <= '0;
      end
    end
  end

endmodule
