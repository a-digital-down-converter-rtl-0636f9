// fir_decim -- decimating low-pass FIR with re-quantized output.
//
// Each valid input sample enters an NTAPS-long delay line. On every DECIM-th
// input the full-precision dot product of the delay line with the
// coefficients is formed (one output per DECIM inputs, so no product is
// computed for samples that decimation would discard), then re-quantized:
// shifted right by SHIFT bits with round-half-up and saturated to OUT_W bits.
// `out_sat` flags an output that had to be clipped.
//
// Coefficients are computed at elaboration as a Blackman-windowed sinc with
// cutoff FC (cycles per input sample), normalised so that they sum to
// 2^(COEF_W-1), i.e. unity DC gain once SHIFT includes COEF_W-1:
//   g[i] = 2*FC*sinc(2*FC*(i-(NTAPS-1)/2)) * (0.42 - 0.5cos(2*pi*i/(NTAPS-1))
//          + 0.08cos(4*pi*i/(NTAPS-1)))
//   h[i] = round(2^(COEF_W-1) * g[i] / sum(g))
//
// Interface: valid-only stream, no back-pressure. Timing: out_valid rises 3
// cycles after the input that completes a decimation group.
// Decimation with anti-alias filtering and re-quantization between stages
// follow the converter; the filter type, lengths and cutoff are this
// design's choices, the reference gives no coefficients.
module fir_decim #(
  parameter int unsigned NTAPS  = 23,
  parameter int unsigned DECIM  = 2,
  parameter int unsigned IN_W   = 32,
  parameter int unsigned OUT_W  = 32,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned SHIFT  = 15,
  parameter real         FC     = 0.25
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_sat
);

  localparam int unsigned AW = IN_W + COEF_W + $clog2(NTAPS);
  typedef logic signed [COEF_W-1:0] coef_t [NTAPS];

  function automatic coef_t make_coefs();
    localparam real PI = 3.14159265358979323846;
    real g [NTAPS];
    real sum, x, w;
    coef_t h;
    sum = 0.0;
    for (int i = 0; i < NTAPS; i++) begin
      x = real'(i) - real'(NTAPS - 1) / 2.0;
      w = 0.42 - 0.5 * $cos(2.0 * PI * real'(i) / real'(NTAPS - 1))
               + 0.08 * $cos(4.0 * PI * real'(i) / real'(NTAPS - 1));
      if (x == 0.0) g[i] = 2.0 * FC * w;
      else          g[i] = $sin(2.0 * PI * FC * x) / (PI * x) * w;
      sum += g[i];
    end
    for (int i = 0; i < NTAPS; i++)
      h[i] = COEF_W'($rtoi($floor(real'(2 ** (COEF_W - 1)) * g[i] / sum + 0.5)));
    return h;
  endfunction

  localparam coef_t COEFS = make_coefs();

  // Delay line and decimation phase.
  logic signed [IN_W-1:0]    dl [NTAPS];
  localparam int unsigned PH_W = $clog2(DECIM + 1);
  logic [PH_W-1:0]            ph;
  logic                       fire;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) dl[i] <= '0;
      ph   <= '0;
      fire <= 1'b0;
    end else begin
      fire <= 1'b0;
      if (in_valid) begin
        dl[0] <= in_data;
        for (int i = 1; i < NTAPS; i++) dl[i] <= dl[i-1];
        if (ph == PH_W'(DECIM - 1)) begin
          ph   <= '0;
          fire <= 1'b1;
        end else begin
          ph <= ph + 1'b1;
        end
      end
    end
  end

  // Full-precision dot product, computed once per output.
  logic signed [AW-1:0] dot;
  always_comb begin
    dot = '0;
    for (int i = 0; i < NTAPS; i++) dot += AW'(dl[i]) * AW'(COEFS[i]);
  end

  logic signed [AW-1:0] acc;
  logic                 acc_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc   <= '0;
      acc_v <= 1'b0;
    end else begin
      acc_v <= fire;
      if (fire) acc <= dot;
    end
  end

  // Re-quantization: round half up, then saturate to OUT_W bits.
  localparam logic signed [AW-1:0] HALF = (SHIFT == 0) ? '0 : AW'(1) <<< (SHIFT - 1);
  localparam logic signed [AW-1:0] QMAX = AW'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [AW-1:0] QMIN = -AW'(64'sd1 <<< (OUT_W - 1));

  logic signed [AW-1:0] rq;
  assign rq = (acc + HALF) >>> SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= acc_v;
      out_sat   <= 1'b0;
      if (acc_v) begin
        if (rq > QMAX) begin
          out_data <= OUT_W'(QMAX);
          out_sat  <= 1'b1;
        end else if (rq < QMIN) begin
          out_data <= OUT_W'(QMIN);
          out_sat  <= 1'b1;
        end else begin
          out_data <= OUT_W'(rq);
        end
      end
    end
  end

endmodule
