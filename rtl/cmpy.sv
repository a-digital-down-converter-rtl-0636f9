// cmpy -- complex mixer: signal times the conjugate of the carrier.
//
// Multiplying the chirp a = ar + j*ai by the conjugate of the carrier
// b = br + j*bi keeps only the difference frequency, which is what a down
// conversion needs:
//   re = ar*br + ai*bi
//   im = ai*br - ar*bi
// Products are registered, then summed; the 33-bit full-precision sums are
// saturated to MIX_W = 32 bits (they only overflow for -32768 operands,
// which the DDS never produces). The output word is packed {im, re}, I in
// bits 31:0 and Q in bits 63:32.
//
// Interface: valid-only stream; the two inputs are sampled together on
// in_valid. Timing: out_valid follows in_valid by 2 cycles.
// The complex multiply and 64-bit output follow the converter; the
// conjugation, the pipeline depth and the saturation are this design's
// choices.
module cmpy
  import ddc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  dds_sample_t            a,
  input  dds_sample_t            b,
  output logic                   out_valid,
  output logic [2*MIX_W-1:0]     out_data
);

  localparam int unsigned PW = 2 * DDS_W;

  logic signed [PW-1:0] p_rr, p_ii, p_ir, p_ri;
  logic                 v_s1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_s1 <= 1'b0;
      p_rr <= '0;
      p_ii <= '0;
      p_ir <= '0;
      p_ri <= '0;
    end else begin
      v_s1 <= in_valid;
      p_rr <= a.re * b.re;
      p_ii <= a.im * b.im;
      p_ir <= a.im * b.re;
      p_ri <= a.re * b.im;
    end
  end

  function automatic logic signed [MIX_W-1:0] clip(input logic signed [PW:0] x);
    localparam logic signed [MIX_W-1:0] MAXV = {1'b0, {(MIX_W-1){1'b1}}};
    localparam logic signed [MIX_W-1:0] MINV = {1'b1, {(MIX_W-1){1'b0}}};
    if (x > (PW+1)'(MAXV)) return MAXV;
    if (x < (PW+1)'(MINV)) return MINV;
    return x[MIX_W-1:0];
  endfunction

  logic signed [PW:0] s_re, s_im;
  assign s_re = (PW+1)'(p_rr) + (PW+1)'(p_ii);
  assign s_im = (PW+1)'(p_ir) - (PW+1)'(p_ri);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v_s1;
      out_data  <= {clip(s_im), clip(s_re)};
    end
  end

endmodule
