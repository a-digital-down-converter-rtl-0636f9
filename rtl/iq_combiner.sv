// iq_combiner -- joins the I and Q outputs into one framed stream.
//
// The I and Q decimation chains run in lock step; each output pair becomes
// one 32-bit word {Q, I} (I in bits 15:0). A word counter marks every
// frame_len-th word with tlast so a DMA engine can close one buffer per
// captured pulse. A frame_len of 0 is treated as 1.
// Interface: valid-only inputs, AXI4-Stream-style output without tready
// (the consumer must accept one word per valid). Timing: one register stage.
// Combining I and Q into one stream for the DMA follows the converter's
// block design; the word layout and the tlast counter are this design's
// choices.
module iq_combiner
  import ddc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    i_valid,
  input  logic signed [OUT_W-1:0] i_data,
  input  logic                    q_valid,
  input  logic signed [OUT_W-1:0] q_data,
  input  logic [31:0]             frame_len,
  output logic [2*OUT_W-1:0]      m_tdata,
  output logic                    m_tvalid,
  output logic                    m_tlast
);

  logic [31:0] cnt;
  logic        last;
  assign last = (cnt + 32'd1 >= frame_len);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      m_tdata  <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
    end else begin
      m_tvalid <= i_valid && q_valid;
      if (i_valid && q_valid) begin
        m_tdata <= {q_data, i_data};
        m_tlast <= last;
        cnt     <= last ? '0 : cnt + 32'd1;
      end else begin
        m_tlast <= 1'b0;
      end
    end
  end

  // The two channels must arrive together.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) i_valid == q_valid);

endmodule
