// tb_ddc_regs -- self-checking testbench for the AXI4-Lite register file.
// Checks reset values, write/read-back of every configuration register,
// byte strobes, the one-cycle start pulse, the STATUS fields, unmapped
// addresses, and that BVALID/RVALID (with RDATA) hold until accepted when
// the master delays BREADY/RREADY. Ready/valid are sampled on the falling
// edge, where they are stable, and the transfer completes on the next rising
// edge.
module tb_ddc_regs;
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
  logic        busy, start;
  logic [15:0] pulses;
  ddc_cfg_t    cfg;

  ddc_regs dut (.*);

  int checks = 0, failures = 0, n_start = 0;
  always @(posedge clk) if (rst_n && start) n_start++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] strb, input int bdelay);
    s_axi_awaddr = a; s_axi_awvalid = 1; s_axi_wdata = d; s_axi_wstrb = strb; s_axi_wvalid = 1;
    s_axi_bready = 0;
    do @(negedge clk); while (!(s_axi_awready && s_axi_wready));
    @(posedge clk);
    #1 s_axi_awvalid = 0; s_axi_wvalid = 0;
    repeat (bdelay) begin
      @(posedge clk); #1;
      checks++;
      if (!s_axi_bvalid) begin failures++; $display("bvalid dropped"); end
    end
    s_axi_bready = 1;
    do @(negedge clk); while (!s_axi_bvalid);
    @(posedge clk);
    #1 s_axi_bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, input int rdelay, output logic [31:0] d);
    logic [31:0] first;
    s_axi_araddr = a; s_axi_arvalid = 1; s_axi_rready = 0;
    do @(negedge clk); while (!s_axi_arready);
    @(posedge clk);
    #1 s_axi_arvalid = 0;
    first = s_axi_rdata;
    repeat (rdelay) begin
      @(posedge clk); #1;
      checks++;
      if (!s_axi_rvalid || s_axi_rdata !== first) begin failures++; $display("read data not held"); end
    end
    s_axi_rready = 1;
    while (!s_axi_rvalid) begin @(posedge clk); #1; end
    d = s_axi_rdata;
    checks++;
    if (s_axi_rresp !== 2'b00) begin failures++; $display("rresp"); end
    @(posedge clk); #1 s_axi_rready = 0;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [31:0] exp);
    logic [31:0] d;
    rd(a, $urandom_range(0, 3), d);
    checks++;
    if (d !== exp) begin failures++; $display("addr %h read %h exp %h", a, d, exp); end
  endtask

  initial begin
    logic [31:0] v [8];
    rst_n = 0; s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_arvalid = 0; s_axi_bready = 0;
    s_axi_rready = 0; s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0;
    busy = 0; pulses = 16'd0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // reset values
    expect_rd(REG_CAR_PINC,  32'h4000_0000);
    expect_rd(REG_LFM_PINC0, 32'h2666_6666);
    expect_rd(REG_LFM_STEP,  32'h0001_179F);
    expect_rd(REG_PULSE_LEN, 32'd12000);
    expect_rd(REG_CAPT_LEN,  32'd12288);
    expect_rd(REG_FRAME_LEN, 32'd3072);

    // write / read back with random data and response delays
    for (int r = 2; r < 8; r++) begin
      v[r] = $urandom;
      wr(8'(4 * r), v[r], 4'hF, $urandom_range(0, 3));
    end
    for (int r = 2; r < 8; r++) expect_rd(8'(4 * r), v[r]);
    checks++;
    if (cfg.car_pinc !== v[2] || cfg.frame_len !== v[7]) begin failures++; $display("cfg outputs"); end

    // byte strobes
    wr(REG_LFM_STEP, 32'hAABB_CCDD, 4'b0101, 0);
    expect_rd(REG_LFM_STEP, {v[4][31:24], 8'hBB, v[4][15:8], 8'hDD});

    // start pulse: exactly one per CTRL write with bit 0 set
    wr(REG_CTRL, 32'h0000_0001, 4'hF, 1);
    wr(REG_CTRL, 32'h0000_0000, 4'hF, 0);
    wr(REG_CTRL, 32'h0000_0001, 4'h0, 0);   // no strobe: ignored
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (n_start != 1) begin failures++; $display("start pulses %0d", n_start); end
    expect_rd(REG_CTRL, 32'h0);

    // status
    busy = 1; pulses = 16'h1234;
    expect_rd(REG_STATUS, 32'h1234_0001);
    busy = 0;
    expect_rd(REG_STATUS, 32'h1234_0000);
    expect_rd(8'hF0, 32'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
