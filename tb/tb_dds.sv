// tb_dds -- self-checking testbench for the DDS.
// Drives a random mix of constant and ramping phase increments, restarts,
// enable gaps and idle cycles. An independent model keeps its own phase
// accumulator and computes the expected cosine/sine directly with $sin and
// $cos at the table's phase points; outputs must match within 1 LSB and
// arrive exactly 2 cycles after their input.
module tb_dds;
  import ddc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n;
  logic               in_valid, in_clr, in_en;
  logic [PHASE_W-1:0] pinc;
  logic               out_valid;
  dds_sample_t        out_data;

  dds dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int due; int s; int c; bit en; } exp_t;
  exp_t q[$];

  localparam real PI = 3.14159265358979323846;

  function automatic int ref_val(input logic [31:0] ph, input bit is_cos);
    real th;
    th = 2.0 * PI * (real'(ph[31:20]) + 0.5) / 4096.0;
    return $rtoi($floor(32767.0 * (is_cos ? $cos(th) : $sin(th)) + 0.5));
  endfunction

  logic [31:0] m_acc;
  int n_out = 0, n_zero = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (e.due != cycle) begin
          failures++;
          $display("latency: due %0d got %0d", e.due, cycle);
        end
        if (!e.en) begin
          n_zero++;
          if (out_data.re != 0 || out_data.im != 0) begin
            failures++;
            $display("gated output not zero");
          end
        end else if ((int'(out_data.re) - e.c) > 1 || (e.c - int'(out_data.re)) > 1 ||
                     (int'(out_data.im) - e.s) > 1 || (e.s - int'(out_data.im)) > 1) begin
          failures++;
          if (failures < 10)
            $display("mismatch: got (%0d,%0d) exp (%0d,%0d)", out_data.re, out_data.im, e.c, e.s);
        end
        n_out++;
      end
    end
  end

  initial begin
    logic [31:0] ph, step;
    rst_n = 1'b0; in_valid = 0; in_clr = 0; in_en = 0; pinc = '0;
    m_acc = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    step = 32'h0001_179F;
    for (int n = 0; n < 20000; n++) begin
      // random stimulus, applied after the clock edge
      in_valid = ($urandom_range(0, 9) != 0);
      in_clr   = (n % 5000 == 0) || ($urandom_range(0, 999) == 0);
      in_en    = ($urandom_range(0, 19) != 0);
      if (n < 4000)       pinc = 32'h4000_0000;            // quarter rate
      else if (n < 8000)  pinc = 32'h0012_3457;            // slow tone
      else if (n < 14000) pinc = 32'h2666_6666 + step * (n - 8000); // chirp ramp
      else                pinc = $urandom;                  // random increments
      if (in_valid) begin
        exp_t e;
        ph = in_clr ? 32'd0 : m_acc;
        m_acc = ph + pinc;
        e.due = cycle + 2; e.s = ref_val(ph, 0); e.c = ref_val(ph, 1); e.en = in_en;
        q.push_back(e);
      end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_zero == 0) begin
      failures++;
      $display("leftover %0d, gated %0d", q.size(), n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
