// tb_ddc_sfdr -- spurious-free dynamic range of the complete converter.
// Runs one capture of a single tone through ddc_top at its default size and
// takes a 1024-point DFT of 1024 consecutive output words from the middle of
// the pulse, weighted by a 4-term Blackman-Harris window (sidelobes below
// -92 dB). Neither the carrier increment nor the tone offset is a multiple
// of 2^20, so the phase-truncation errors of the two DDSs differ and do not
// cancel in the mixer:
//   carrier = 0x4001_2345, tone = carrier + 0x0666_6666 + 0x0003_5791
// (about 3.01 MHz above the carrier, between DFT bins).
// The SFDR is the tone peak over the largest bin outside the window's main
// lobe (+-5 bins). The converter aims at about 70 dB; the check requires at
// least 66 dB, the peak in the expected bin, and a magnitude of 16384 within
// the window's scalloping loss.
module tb_ddc_sfdr;
  import ddc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic [7:0]  s_axi_awaddr, s_axi_araddr;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic [31:0] m_axis_tdata;
  logic        m_axis_tvalid, m_axis_tlast, busy, sat;

  ddc_top dut (.*);

  localparam real         PI    = 3.14159265358979323846;
  localparam int          N     = 1024;
  localparam logic [31:0] CAR   = 32'h4001_2345;
  localparam logic [31:0] DPINC = 32'h0666_6666 + 32'h0003_5791;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    s_axi_awaddr = a; s_axi_awvalid = 1; s_axi_wdata = d; s_axi_wstrb = 4'hF; s_axi_wvalid = 1;
    s_axi_bready = 1;
    do @(negedge clk); while (!(s_axi_awready && s_axi_wready));
    @(posedge clk); #1;
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (!s_axi_bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_axi_bready = 0;
  endtask

  real xr[$], xi[$];
  bit  done = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && m_axis_tvalid) begin
      xr.push_back(real'($signed(m_axis_tdata[15:0])));
      xi.push_back(real'($signed(m_axis_tdata[31:16])));
      if (m_axis_tlast) done = 1;
    end
  end

  initial begin
    real cw [N], sw [N], win [N], mags [N];
    real pk, spur, ar, ai, sfdr, exp_bin, cg;
    int  pk_bin, spur_bin, idx, bd;
    rst_n = 0; s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_arvalid = 0; s_axi_bready = 0;
    s_axi_rready = 0; s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1;

    wr(REG_CAR_PINC,  CAR);
    wr(REG_LFM_PINC0, CAR + DPINC);
    wr(REG_LFM_STEP,  32'h0);
    wr(REG_CTRL,      32'h1);
    while (!done) begin @(posedge clk); #1; end

    cg = 0.0;
    for (int k = 0; k < N; k++) begin
      cw[k]  = $cos(2.0 * PI * k / N);
      sw[k]  = $sin(2.0 * PI * k / N);
      win[k] = 0.35875 - 0.48829 * $cos(2.0 * PI * k / N) + 0.14128 * $cos(4.0 * PI * k / N)
                       - 0.01168 * $cos(6.0 * PI * k / N);
      cg += win[k];
    end
    pk = 0.0; pk_bin = -1;
    for (int k = 0; k < N; k++) begin
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < N; n++) begin
        idx = (k * n) % N;
        // X[k] = sum w[n] x[n] exp(-j 2 pi k n / N)
        ar += win[n] * (xr[1000 + n] * cw[idx] + xi[1000 + n] * sw[idx]);
        ai += win[n] * (xi[1000 + n] * cw[idx] - xr[1000 + n] * sw[idx]);
      end
      mags[k] = $sqrt(ar * ar + ai * ai);
      if (mags[k] > pk) begin pk = mags[k]; pk_bin = k; end
    end
    spur = 0.0; spur_bin = -1;
    for (int k = 0; k < N; k++) begin
      bd = (k - pk_bin + N) % N;
      if (bd > N / 2) bd = N - bd;
      if (bd > 5 && mags[k] > spur) begin spur = mags[k]; spur_bin = k; end
    end
    // tone frequency in output bins: DPINC / 2^32 * 120 MHz / (30 MHz / 1024)
    exp_bin = real'(DPINC) / 1048576.0;
    sfdr = 20.0 * $log10(pk / spur);
    $display("tone bin %0d (expected %0.2f) magnitude %f, largest spur bin %0d, SFDR %0.1f dB",
             pk_bin, exp_bin, pk / cg, spur_bin, sfdr);
    checks++;
    if (real'(pk_bin) < exp_bin - 1.0 || real'(pk_bin) > exp_bin + 1.0) begin
      failures++; $display("FAIL: tone in the wrong bin");
    end
    checks++;
    if (pk / cg < 16384.0 * 0.88 || pk / cg > 16384.0 * 1.01) begin failures++; $display("FAIL: tone magnitude"); end
    checks++;
    if (sfdr < 66.0) begin failures++; $display("FAIL: SFDR below 66 dB"); end
    checks++;
    if (xr.size() != 3072) begin failures++; $display("FAIL: frame of %0d words", xr.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
