// tb_ddc_top -- end-to-end testbench of the down converter at its default
// (full) size: 120 MHz-rate samples, 12000-sample pulses, 12288-sample
// captures, 3072-word frames.
// A small AXI4-Lite master programs the registers and starts captures; a
// monitor collects the 32-bit {Q, I} stream into frames closed by tlast.
// Four captures are run:
//   1. tone 3 MHz above the carrier: the output must be a complex tone of
//      magnitude 16384 (unity gain to 16 bits) turning by +2*pi*3/30 rad
//      per output word;
//   2. tone 24 MHz above the carrier: in the stop band, magnitude below 20;
//   3. the reset-value chirp (-12..+12 MHz at baseband): constant magnitude
//      through the middle of the pulse, instantaneous frequency rising from
//      negative to positive, and a flushed (near-zero) tail;
//   4. a falling chirp with a START written while busy, which is ignored.
// Every capture must give exactly 3072 words, tlast on the last one only,
// one word every 4 clocks. The mechanisms seen (chirp sweep, mixing to
// baseband, stop-band rejection, decimation rate, zero tail, framing,
// start ignored while busy) are counted; one never seen is a failure.
module tb_ddc_top;
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

  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int m_chirp = 0, m_mix = 0, m_reject = 0, m_rate = 0, m_tail = 0, m_frame = 0, m_ignore = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite master ----------------
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

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    s_axi_araddr = a; s_axi_arvalid = 1; s_axi_rready = 1;
    do @(negedge clk); while (!s_axi_arready);
    @(posedge clk); #1;
    s_axi_arvalid = 0;
    while (!s_axi_rvalid) begin @(posedge clk); #1; end
    d = s_axi_rdata;
    @(posedge clk); #1;
    s_axi_rready = 0;
  endtask

  // ---------------- stream monitor ----------------
  real re_q[$], im_q[$];
  int  t_q[$];
  int  n_last_in_frame = 0;
  bit  frame_done = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n && m_axis_tvalid) begin
      re_q.push_back(real'($signed(m_axis_tdata[15:0])));
      im_q.push_back(real'($signed(m_axis_tdata[31:16])));
      t_q.push_back(cycle);
      if (m_axis_tlast) begin
        n_last_in_frame++;
        frame_done = 1;
      end
    end
  end

  function automatic real mag(input int k);
    return $sqrt(re_q[k] * re_q[k] + im_q[k] * im_q[k]);
  endfunction

  // phase advance from word k to word k+1, wrapped to (-pi, pi]
  function automatic real dphi(input int k);
    real d;
    d = $atan2(im_q[k+1], re_q[k+1]) - $atan2(im_q[k], re_q[k]);
    while (d > PI) d -= 2.0 * PI;
    while (d <= -PI) d += 2.0 * PI;
    return d;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Start one capture and wait for its frame; check framing and rate.
  task automatic capture(input bit poke_busy);
    bit ok_rate;
    re_q.delete(); im_q.delete(); t_q.delete();
    n_last_in_frame = 0; frame_done = 0;
    wr(REG_CTRL, 32'h1);
    if (poke_busy) begin
      repeat (100) @(posedge clk);
      #1;
      check(busy, "busy during capture");
      wr(REG_CTRL, 32'h1);     // must be ignored
    end
    while (!frame_done) begin @(posedge clk); #1; end
    repeat (200) @(posedge clk);
    #1;
    check(re_q.size() == 3072, $sformatf("frame length %0d", re_q.size()));
    check(n_last_in_frame == 1, "exactly one tlast per frame");
    if (re_q.size() == 3072 && n_last_in_frame == 1) m_frame++;
    ok_rate = (re_q.size() > 1);
    for (int k = 1; k < re_q.size(); k++) if (t_q[k] - t_q[k-1] != 4) ok_rate = 0;
    check(ok_rate, "one word every 4 clocks");
    if (ok_rate) m_rate++;
    if (poke_busy) begin
      check(!busy && !m_axis_tvalid, "second start ignored");
      if (!busy && !m_axis_tvalid) m_ignore++;
    end
  endtask

  initial begin
    logic [31:0] st;
    real mn, mx, d;
    bit ok;

    rst_n = 0; s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_arvalid = 0; s_axi_bready = 0;
    s_axi_rready = 0; s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1;

    // 1. passband tone: carrier + 3 MHz (2^32 * 3/120 = 0x0666_6666)
    wr(REG_LFM_PINC0, 32'h4666_6666);
    wr(REG_LFM_STEP, 32'h0);
    capture(0);
    mn = 1.0e9; mx = 0.0; ok = 1;
    for (int k = 500; k < 2500; k++) begin
      if (mag(k) < mn) mn = mag(k);
      if (mag(k) > mx) mx = mag(k);
      d = dphi(k);
      if (d < 0.2 * PI - 0.01 || d > 0.2 * PI + 0.01) ok = 0;
    end
    check(mn > 16300.0 && mx < 16470.0, $sformatf("tone magnitude %f..%f", mn, mx));
    check(ok, "tone turns by 0.2*pi per word");
    if (ok && mn > 16300.0) m_mix++;

    // 2. stop-band tone: carrier + 24 MHz (0x3333_3333)
    wr(REG_LFM_PINC0, 32'h7333_3333);
    capture(0);
    mx = 0.0;
    for (int k = 500; k < 2500; k++) if (mag(k) > mx) mx = mag(k);
    check(mx < 20.0, $sformatf("stop-band magnitude %f", mx));
    if (mx < 20.0) m_reject++;

    // 3. reset-value chirp: 18..42 MHz against the 30 MHz carrier
    wr(REG_LFM_PINC0, 32'h2666_6666);
    wr(REG_LFM_STEP, 32'h0001_179F);
    capture(0);
    mn = 1.0e9; mx = 0.0;
    for (int k = 600; k < 2400; k++) begin
      if (mag(k) < mn) mn = mag(k);
      if (mag(k) > mx) mx = mag(k);
    end
    check(mn > 16300.0 && mx < 16470.0, $sformatf("chirp magnitude %f..%f", mn, mx));
    // instantaneous frequency: about -7.2 MHz at word 600, +7.2 MHz at word 2400
    check(dphi(600) < -0.4 * PI && dphi(600) > -0.56 * PI, $sformatf("chirp start freq %f", dphi(600)));
    check(dphi(2400) > 0.4 * PI && dphi(2400) < 0.56 * PI, $sformatf("chirp end freq %f", dphi(2400)));
    check(dphi(1500) > -0.05 && dphi(1500) < 0.05, $sformatf("chirp centre freq %f", dphi(1500)));
    if (dphi(600) < 0.0 && dphi(2400) > 0.0 && dphi(1200) < dphi(1800)) m_chirp++;
    mx = 0.0;
    for (int k = 3052; k < 3072; k++) if (mag(k) > mx) mx = mag(k);
    check(mx <= 4.0, $sformatf("tail magnitude %f", mx));
    if (mx <= 4.0) m_tail++;

    // 4. falling chirp 42..18 MHz, START poked while busy
    wr(REG_LFM_PINC0, 32'h5999_999A);
    wr(REG_LFM_STEP, 32'hFFFE_E861);
    capture(1);
    check(dphi(600) > 0.4 * PI && dphi(2400) < -0.4 * PI, "falling chirp");
    if (dphi(600) > 0.0 && dphi(2400) < 0.0) m_chirp++;

    rd(REG_STATUS, st);
    check(st == 32'h0004_0000, $sformatf("status %h", st));
    check(!sat, "no clipping");

    $display("mechanisms: chirp %0d mix %0d reject %0d rate %0d tail %0d frame %0d ignore %0d",
             m_chirp, m_mix, m_reject, m_rate, m_tail, m_frame, m_ignore);
    check(m_chirp > 0,  "chirp sweep seen");
    check(m_mix > 0,    "mixing to baseband seen");
    check(m_reject > 0, "stop-band rejection seen");
    check(m_rate > 0,   "decimation by 4 seen");
    check(m_tail > 0,   "zero tail seen");
    check(m_frame > 0,  "framing seen");
    check(m_ignore > 0, "start while busy ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
