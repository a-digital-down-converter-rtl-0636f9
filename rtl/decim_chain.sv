// decim_chain -- two-stage filtering and decimation of one channel (I or Q).
//
// Two fir_decim stages in cascade, each halving the rate (4 in all):
//   stage 1: 23 taps, 32-bit in, 32-bit out, unity gain (SHIFT = 15);
//   stage 2: 63 taps, 32-bit in, re-quantized to 16 bits (SHIFT = 31,
//            i.e. unity gain then the upper 16 of 32 bits are kept).
// Splitting the decimation in two lets the first, short filter run at the
// high rate while the long, sharp filter runs at half rate. At a 120 MHz
// input rate the output is 30 MHz and stage 2 passes about +/-12 MHz.
// Interface: valid-only stream. Timing: 6 cycles from the input that
// completes a group of four to out_valid. `out_sat` pulses when either stage
// clipped a sample.
// The two-stage cascade, the 32-bit intermediate and the 16-bit output follow
// the converter; tap counts, cutoffs and shifts are this design's choices.
module decim_chain
  import ddc_pkg::*;
#(
  parameter int unsigned IN_W   = MIX_W,
  parameter int unsigned MID_W  = 32,
  parameter int unsigned O_W    = OUT_W,
  parameter int unsigned TAPS1  = 23,
  parameter int unsigned TAPS2  = 63,
  parameter int unsigned DECIM1 = 2,
  parameter int unsigned DECIM2 = 2,
  parameter int unsigned SHIFT1 = 15,
  parameter int unsigned SHIFT2 = 31
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                  mid_valid,
  output logic signed [MID_W-1:0] mid_data,
  output logic                  out_valid,
  output logic signed [O_W-1:0] out_data,
  output logic                  out_sat
);

  logic sat1, sat2;

  fir_decim #(
    .NTAPS(TAPS1), .DECIM(DECIM1), .IN_W(IN_W), .OUT_W(MID_W),
    .COEF_W(16), .SHIFT(SHIFT1), .FC(0.25)
  ) u_stage1 (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (in_data),
    .out_valid(mid_valid),
    .out_data (mid_data),
    .out_sat  (sat1)
  );

  fir_decim #(
    .NTAPS(TAPS2), .DECIM(DECIM2), .IN_W(MID_W), .OUT_W(O_W),
    .COEF_W(16), .SHIFT(SHIFT2), .FC(0.25)
  ) u_stage2 (
    .clk, .rst_n,
    .in_valid (mid_valid),
    .in_data  (mid_data),
    .out_valid(out_valid),
    .out_data (out_data),
    .out_sat  (sat2)
  );

  assign out_sat = sat1 | sat2;

endmodule
