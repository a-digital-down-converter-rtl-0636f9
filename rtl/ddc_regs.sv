// ddc_regs -- AXI4-Lite register file of the DDC control logic.
//
// The processor configures the converter through these registers: carrier
// and chirp phase increments, chirp sweep step, pulse length, capture length
// and DMA frame length, and starts a pulse by writing 1 to CTRL bit 0
// (a one-cycle `start` pulse; the bit reads back as 0). STATUS reads the
// sequencer's busy flag (bit 0) and completed-pulse count (bits 31:16).
// Register addresses are listed in ddc_pkg.
//
// Protocol: a write is taken when AWVALID and WVALID are both high and no
// response is pending; AWREADY/WREADY pulse for that cycle and BVALID is held
// until BREADY. A read is taken when ARVALID is high and no read data is
// pending; RVALID is held until RREADY. WSTRB is honoured per byte. All
// responses are OKAY; unmapped addresses read 0.
// Reset values give a 24 MHz-wide chirp centred on a 30 MHz carrier at a
// 120 MHz sample rate, 12000 samples (100 us) long. That sample plan, the
// register map and the reset values are this design's choices.
module ddc_regs
  import ddc_pkg::*;
#(
  parameter logic [31:0] RST_CAR_PINC  = 32'h4000_0000, // 30 MHz at 120 MHz
  parameter logic [31:0] RST_LFM_PINC0 = 32'h2666_6666, // 18 MHz at 120 MHz
  parameter logic [31:0] RST_LFM_STEP  = 32'h0001_179F, // +24 MHz over 12000 samples
  parameter logic [31:0] RST_PULSE_LEN = 32'd12000,
  parameter logic [31:0] RST_CAPT_LEN  = 32'd12288,
  parameter logic [31:0] RST_FRAME_LEN = 32'd3072
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // status in, configuration out
  input  logic        busy,
  input  logic [15:0] pulses,
  output ddc_cfg_t    cfg,
  output logic        start
);

  logic do_wr, do_rd;
  assign do_wr = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign do_rd = s_axi_arvalid && !s_axi_rvalid;

  assign s_axi_awready = do_wr;
  assign s_axi_wready  = do_wr;
  assign s_axi_arready = do_rd;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg.car_pinc  <= RST_CAR_PINC;
      cfg.lfm_pinc0 <= RST_LFM_PINC0;
      cfg.lfm_step  <= RST_LFM_STEP;
      cfg.pulse_len <= RST_PULSE_LEN;
      cfg.capt_len  <= RST_CAPT_LEN;
      cfg.frame_len <= RST_FRAME_LEN;
      start         <= 1'b0;
      s_axi_bvalid  <= 1'b0;
    end else begin
      start <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (do_wr) begin
        s_axi_bvalid <= 1'b1;
        unique case (s_axi_awaddr[7:2])
          REG_CTRL[7:2]:      start <= s_axi_wstrb[0] && s_axi_wdata[0];
          REG_CAR_PINC[7:2]:  cfg.car_pinc  <= merge(cfg.car_pinc,  s_axi_wdata, s_axi_wstrb);
          REG_LFM_PINC0[7:2]: cfg.lfm_pinc0 <= merge(cfg.lfm_pinc0, s_axi_wdata, s_axi_wstrb);
          REG_LFM_STEP[7:2]:  cfg.lfm_step  <= merge(cfg.lfm_step,  s_axi_wdata, s_axi_wstrb);
          REG_PULSE_LEN[7:2]: cfg.pulse_len <= merge(cfg.pulse_len, s_axi_wdata, s_axi_wstrb);
          REG_CAPT_LEN[7:2]:  cfg.capt_len  <= merge(cfg.capt_len,  s_axi_wdata, s_axi_wstrb);
          REG_FRAME_LEN[7:2]: cfg.frame_len <= merge(cfg.frame_len, s_axi_wdata, s_axi_wstrb);
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (do_rd) begin
        s_axi_rvalid <= 1'b1;
        unique case (s_axi_araddr[7:2])
          REG_STATUS[7:2]:    s_axi_rdata <= {pulses, 15'd0, busy};
          REG_CAR_PINC[7:2]:  s_axi_rdata <= cfg.car_pinc;
          REG_LFM_PINC0[7:2]: s_axi_rdata <= cfg.lfm_pinc0;
          REG_LFM_STEP[7:2]:  s_axi_rdata <= cfg.lfm_step;
          REG_PULSE_LEN[7:2]: s_axi_rdata <= cfg.pulse_len;
          REG_CAPT_LEN[7:2]:  s_axi_rdata <= cfg.capt_len;
          REG_FRAME_LEN[7:2]: s_axi_rdata <= cfg.frame_len;
          default:            s_axi_rdata <= '0;
        endcase
      end
    end
  end

  // Handshake rules: a pending response holds until accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
