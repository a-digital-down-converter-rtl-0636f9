// tb_decim_chain -- self-checking testbench for the two-stage decimator.
// Feeds one channel with segments of known signals at one sample per clock
// and checks the filtered result against the values a unity-gain,
// 16-bit-output low-pass decimator by 4 must give:
//   DC of 2^30           -> settles to 2^30 / 2^16 = 16384 (+-4)
//   6 MHz tone (0.05 fs) -> passes, peak 16384 within 3 %
//   24 MHz tone (0.2 fs) -> stage-2 stop band, peak below 16
//   54 MHz tone (0.45 fs)-> would alias to 6 MHz without stage 1, peak below 16
//   full-scale DC        -> 32768 does not fit in 16 bits: clipped, flagged
// It also checks that exactly one output leaves per four inputs.
module tb_decim_chain;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, in_valid, mid_valid, out_valid, out_sat;
  logic signed [31:0] in_data, mid_data;
  logic signed [15:0] out_data;

  decim_chain dut (.*);

  int checks = 0, failures = 0, n_out = 0, n_sat = 0;
  int peak;
  localparam real PI = 3.14159265358979323846;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      n_out++;
      if (out_sat) n_sat++;
      if (int'(out_data) > peak) peak = int'(out_data);
      if (-int'(out_data) > peak) peak = -int'(out_data);
    end
  end

  task automatic run(input real f, input real amp, input int n);
    for (int i = 0; i < n; i++) begin
      in_data = 32'($rtoi($floor(amp * $cos(2.0 * PI * f * i) + 0.5)));
      if (f == 0.0) in_data = 32'($rtoi(amp));
      @(posedge clk);
      #1;
    end
  endtask

  task automatic check_peak(input string what, input int lo, input int hi);
    checks++;
    if (peak < lo || peak > hi) begin
      failures++;
      $display("%s: peak %0d outside [%0d,%0d]", what, peak, lo, hi);
    end
  endtask

  initial begin
    int n_sat0;
    rst_n = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; in_valid = 1;

    run(0.0, 1073741824.0, 400); peak = 0;            // settle, then measure
    run(0.0, 1073741824.0, 400); check_peak("dc", 16380, 16388);
    checks++;
    if (out_data < 16380 || out_data > 16388) begin failures++; $display("dc value %0d", out_data); end

    run(0.05, 1073741824.0, 400); peak = 0;
    run(0.05, 1073741824.0, 800); check_peak("passband", 15892, 16876);

    run(0.2, 1073741824.0, 400); peak = 0;
    run(0.2, 1073741824.0, 800); check_peak("stage-2 stopband", 0, 15);

    run(0.45, 1073741824.0, 400); peak = 0;
    run(0.45, 1073741824.0, 800); check_peak("stage-1 alias band", 0, 15);

    n_sat0 = n_sat;
    run(0.0, 2147483647.0, 400);
    checks++;
    if (n_sat == n_sat0 || out_data != 16'sd32767) begin
      failures++; $display("saturation not seen: %0d %0d", n_sat - n_sat0, out_data);
    end

    in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    // 4800 inputs in all -> 1200 outputs
    if (n_out != 1200) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
