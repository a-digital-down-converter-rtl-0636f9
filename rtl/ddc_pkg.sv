// ddc_pkg -- widths, register map and fixed-point helpers shared by the DDC.
//
// The sample widths follow the signal widths of the reference simulation:
// each DDS delivers cosine and sine packed in 32 bits (16 bits each), the
// complex mixer delivers 64 bits (32-bit I and Q), the first decimation stage
// keeps 32 bits and the second re-quantizes to 16 bits. The phase accumulator
// width, the sine table size and the register map are this design's own
// choices.
package ddc_pkg;

  // Phase accumulator and DDS output widths.
  localparam int unsigned PHASE_W = 32;
  localparam int unsigned DDS_W   = 16;
  // Mixer output width per component (fits 2 * 32767^2 without overflow).
  localparam int unsigned MIX_W   = 32;
  // Output sample width after re-quantization.
  localparam int unsigned OUT_W   = 16;

  // AXI4-Lite register map (byte addresses).
  localparam logic [7:0] REG_CTRL      = 8'h00; // W: bit0 start (self-clearing)
  localparam logic [7:0] REG_STATUS    = 8'h04; // R: bit0 busy, [31:16] pulses done
  localparam logic [7:0] REG_CAR_PINC  = 8'h08; // carrier phase increment
  localparam logic [7:0] REG_LFM_PINC0 = 8'h0C; // chirp start phase increment
  localparam logic [7:0] REG_LFM_STEP  = 8'h10; // chirp increment step per sample (signed)
  localparam logic [7:0] REG_PULSE_LEN = 8'h14; // pulse length in input samples
  localparam logic [7:0] REG_CAPT_LEN  = 8'h18; // capture length in input samples
  localparam logic [7:0] REG_FRAME_LEN = 8'h1C; // output words per DMA frame

  // Run-time configuration produced by the register file.
  typedef struct packed {
    logic [PHASE_W-1:0] car_pinc;
    logic [PHASE_W-1:0] lfm_pinc0;
    logic [PHASE_W-1:0] lfm_step;
    logic [31:0]        pulse_len;
    logic [31:0]        capt_len;
    logic [31:0]        frame_len;
  } ddc_cfg_t;

  // A complex sample of the DDS outputs.
  typedef struct packed {
    logic signed [DDS_W-1:0] im;   // sine, upper half of the 32-bit word
    logic signed [DDS_W-1:0] re;   // cosine, lower half
  } dds_sample_t;

endpackage
