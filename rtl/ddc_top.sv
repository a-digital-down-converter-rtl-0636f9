// ddc_top -- digital down converter with on-chip LFM test waveform.
//
// Signal path (one sample per clock while a capture runs):
//   chirp_ctrl -> dds (LFM) --\
//                              cmpy (x conj) -> I/Q split -> decim_chain (I) --\
//   cfg.car_pinc -> dds (carrier) /                        -> decim_chain (Q) --> iq_combiner
// A processor programs ddc_regs over AXI4-Lite and writes START. The
// sequencer then streams a chirp (linearly rising phase increment) into the
// LFM DDS for pulse_len samples followed by a zero tail, up to capt_len
// samples; the carrier NCO is restarted with the pulse so it is phase
// synchronous. The mixer multiplies the chirp by the conjugate carrier,
// leaving the baseband chirp. Its 64-bit word is split into 32-bit I and Q,
// each decimated by 2 and 2 with re-quantization to 16 bits, and the pairs
// leave as 32-bit words on m_axis, with tlast every frame_len words, for a
// DMA engine into processor memory.
// Latency from a sample entering the DDSs to its effect on the output: the
// DDS (2), mixer (2), two FIR stages (3 + 3 plus the filter delay) and the
// combiner (1). With the reset settings one capture of 12288 input samples
// gives a frame of 3072 output words.
// The architecture follows the converter's block diagram; the register map,
// widths not visible in the reference simulation, filter details and the
// stream framing are this design's choices (see the README).
module ddc_top
  import ddc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control slave
  input  logic [7:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // Output stream towards the DMA engine
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  output logic        m_axis_tlast,
  // Status
  output logic        busy,
  output logic        sat
);

  ddc_cfg_t           cfg;
  logic               start;
  logic [15:0]        pulses;

  ddc_regs u_regs (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .busy, .pulses, .cfg, .start
  );

  logic               s_valid, s_clr, s_en;
  logic [PHASE_W-1:0] s_pinc;

  chirp_ctrl u_chirp (
    .clk, .rst_n, .start,
    .lfm_pinc0(cfg.lfm_pinc0),
    .lfm_step (cfg.lfm_step),
    .pulse_len(cfg.pulse_len),
    .capt_len (cfg.capt_len),
    .busy, .pulses,
    .s_valid, .s_clr, .s_en, .s_pinc
  );

  logic        lfm_v, car_v;
  dds_sample_t lfm_d, car_d;

  dds u_dds_lfm (
    .clk, .rst_n,
    .in_valid(s_valid), .in_clr(s_clr), .in_en(s_en), .pinc(s_pinc),
    .out_valid(lfm_v), .out_data(lfm_d)
  );

  dds u_dds_car (
    .clk, .rst_n,
    .in_valid(s_valid), .in_clr(s_clr), .in_en(1'b1), .pinc(cfg.car_pinc),
    .out_valid(car_v), .out_data(car_d)
  );

  logic                 mix_v;
  logic [2*MIX_W-1:0]   mix_d;

  cmpy u_cmpy (
    .clk, .rst_n,
    .in_valid(lfm_v && car_v), .a(lfm_d), .b(car_d),
    .out_valid(mix_v), .out_data(mix_d)
  );

  // I and Q split: pure wiring of the packed mixer word.
  logic signed [MIX_W-1:0] mix_i, mix_q;
  assign mix_i = mix_d[MIX_W-1:0];
  assign mix_q = mix_d[2*MIX_W-1:MIX_W];

  logic                    i_v, q_v, i_sat, q_sat;
  logic signed [OUT_W-1:0] i_d, q_d;

  decim_chain u_chain_i (
    .clk, .rst_n,
    .in_valid(mix_v), .in_data(mix_i),
    .mid_valid(), .mid_data(),
    .out_valid(i_v), .out_data(i_d), .out_sat(i_sat)
  );

  decim_chain u_chain_q (
    .clk, .rst_n,
    .in_valid(mix_v), .in_data(mix_q),
    .mid_valid(), .mid_data(),
    .out_valid(q_v), .out_data(q_d), .out_sat(q_sat)
  );

  assign sat = i_sat | q_sat;

  iq_combiner u_comb (
    .clk, .rst_n,
    .i_valid(i_v), .i_data(i_d),
    .q_valid(q_v), .q_data(q_d),
    .frame_len(cfg.frame_len),
    .m_tdata(m_axis_tdata), .m_tvalid(m_axis_tvalid), .m_tlast(m_axis_tlast)
  );

endmodule
