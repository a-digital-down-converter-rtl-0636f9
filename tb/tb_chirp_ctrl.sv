// tb_chirp_ctrl -- self-checking testbench for the pulse sequencer.
// Starts captures with several lengths and checks, sample by sample, that
// the increment follows pinc0 + n*step, that exactly pulse_len samples are
// enabled and capt_len are valid, that only the first carries clr, that the
// samples are back to back starting the cycle after start, that a start
// while busy is ignored, and that the pulse counter advances.
module tb_chirp_ctrl;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, start, busy, s_valid, s_clr, s_en;
  logic [31:0] lfm_pinc0, lfm_step, pulse_len, capt_len, s_pinc;
  logic [15:0] pulses;

  chirp_ctrl dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int plen, input int clen, input logic [31:0] p0, input logic [31:0] st);
    int n = 0, n_en = 0, n_clr = 0;
    logic [15:0] p_before;
    lfm_pinc0 = p0; lfm_step = st; pulse_len = plen; capt_len = clen;
    p_before = pulses;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (s_valid) begin
      checks++;
      if (s_pinc !== p0 + st * 32'(n) || s_en !== (n < plen) || s_clr !== (n == 0) || !busy) begin
        failures++;
        if (failures < 10) $display("n=%0d pinc %h en %0b clr %0b", n, s_pinc, s_en, s_clr);
      end
      if (n == 10) start = 1;        // must be ignored while busy
      else start = 0;
      n++;
      @(posedge clk); #1;
    end
    checks++;
    if (n != clen || busy || pulses != p_before + 16'd1) begin
      failures++;
      $display("capture length %0d (exp %0d), busy %0b, pulses %0d", n, clen, busy, pulses);
    end
    repeat (3) @(posedge clk); #1;
    checks++;
    if (s_valid) begin failures++; $display("restarted while busy"); end
  endtask

  initial begin
    rst_n = 0; start = 0; lfm_pinc0 = 0; lfm_step = 0; pulse_len = 0; capt_len = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    pulse(100, 128, 32'h2666_6666, 32'h0001_179F);
    pulse(12000, 12288, 32'h2666_6666, 32'h0001_179F);
    pulse(50, 50, 32'hF000_0000, 32'hFFFF_F000);   // falling chirp, no tail
    // zero capture length: nothing happens
    capt_len = 0; start = 1; @(posedge clk); #1; start = 0;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (s_valid || busy) begin failures++; $display("zero-length capture started"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
