// tb_fir_decim -- self-checking testbench for the decimating FIR.
// Two instances: the first-stage shape (23 taps, 32 -> 32 bits, SHIFT 15)
// and the second-stage shape (63 taps, 32 -> 16 bits, SHIFT 31). The
// testbench derives the windowed-sinc coefficients itself, keeps its own
// input history and computes each decimated output with 64-bit arithmetic,
// round-half-up and saturation. It checks every output value, that exactly
// one output comes per DECIM inputs, that each appears 3 cycles after the
// input completing its group, and that saturation is flagged.
module tb_fir_decim;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, in_valid;
  logic signed [31:0] in_data;
  logic               v1, v2, s1, s2;
  logic signed [31:0] d1;
  logic signed [15:0] d2;

  fir_decim #(.NTAPS(23), .DECIM(2), .IN_W(32), .OUT_W(32), .SHIFT(15)) dut1 (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(v1), .out_data(d1), .out_sat(s1));
  fir_decim #(.NTAPS(63), .DECIM(2), .IN_W(32), .OUT_W(16), .SHIFT(31)) dut2 (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(v2), .out_data(d2), .out_sat(s2));

  int checks = 0, failures = 0, cycle = 0, n_sat = 0, n_in = 0, n_o1 = 0, n_o2 = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam real PI = 3.14159265358979323846;
  longint h1 [23];
  longint h2 [63];

  task automatic make_h(input int n, output longint h []);
    real g [];
    real s, x, w;
    g = new[n]; h = new[n];
    s = 0.0;
    for (int i = 0; i < n; i++) begin
      x = i - (n - 1) / 2.0;
      w = 0.42 - 0.5 * $cos(2.0 * PI * i / (n - 1)) + 0.08 * $cos(4.0 * PI * i / (n - 1));
      g[i] = (x == 0.0) ? 0.5 * w : $sin(0.5 * PI * x) / (PI * x) * w;
      s += g[i];
    end
    for (int i = 0; i < n; i++) h[i] = longint'($floor(32768.0 * g[i] / s + 0.5));
  endtask

  longint hist[$];   // newest first
  typedef struct { int due; longint v; bit sat; } exp_t;
  exp_t q1[$], q2[$];

  function automatic exp_t requant(input longint acc, input int sh, input int w, input int due);
    exp_t e;
    longint r, mx;
    r  = (acc + (64'sd1 <<< (sh - 1))) >>> sh;
    mx = (64'sd1 <<< (w - 1)) - 1;
    e.due = due; e.sat = 0;
    if (r > mx)            begin e.v = mx;      e.sat = 1; end
    else if (r < -mx - 1)  begin e.v = -mx - 1; e.sat = 1; end
    else                   e.v = r;
    return e;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && v1) begin
      exp_t e;
      e = q1.pop_front();
      checks++; n_o1++;
      if (e.due != cycle || longint'(d1) != e.v || s1 != e.sat) begin
        failures++;
        if (failures < 10) $display("stage1 mismatch @%0d: got %0d exp %0d due %0d", cycle, d1, e.v, e.due);
      end
    end
    if (rst_n && v2) begin
      exp_t e;
      e = q2.pop_front();
      checks++; n_o2++;
      if (s2) n_sat++;
      if (e.due != cycle || longint'(d2) != e.v || s2 != e.sat) begin
        failures++;
        if (failures < 10) $display("stage2 mismatch @%0d: got %0d exp %0d due %0d", cycle, d2, e.v, e.due);
      end
    end
  end

  initial begin
    longint hh [];
    longint s;
    make_h(23, hh); foreach (h1[i]) h1[i] = hh[i];
    make_h(63, hh); foreach (h2[i]) h2[i] = hh[i];
    // coefficients must sum to about unity gain
    s = 0; foreach (h2[i]) s += h2[i];
    checks++;
    if (s < 32760 || s > 32776) begin failures++; $display("gain %0d", s); end
    for (int i = 0; i < 63; i++) hist.push_back(0);

    rst_n = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      if (n < 1000)      in_data = (n % 64 < 32) ? 32'sd1073741824 : -32'sd1073741824; // large square wave
      else if (n < 2000) in_data = 32'sd2147483647;                                   // full scale DC: clips in stage 2
      else               in_data = $signed($urandom) >>> $urandom_range(0, 12);
      if (in_valid) begin
        longint a1, a2;
        hist.push_front(longint'(in_data));
        void'(hist.pop_back());
        n_in++;
        if (n_in % 2 == 0) begin
          a1 = 0; a2 = 0;
          for (int i = 0; i < 23; i++) a1 += hist[i] * h1[i];
          for (int i = 0; i < 63; i++) a2 += hist[i] * h2[i];
          q1.push_back(requant(a1, 15, 32, cycle + 3));
          q2.push_back(requant(a2, 31, 16, cycle + 3));
        end
      end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q1.size() != 0 || q2.size() != 0 || n_o1 != n_in / 2 || n_o2 != n_in / 2 || n_sat == 0) begin
      failures++;
      $display("counts: in %0d out %0d/%0d sat %0d left %0d/%0d", n_in, n_o1, n_o2, n_sat, q1.size(), q2.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
