// tb_cmpy -- self-checking testbench for the conjugating complex mixer.
// Random operands (and the -32768 corner that must clip) are applied with
// random valid gaps; the expected a*conj(b) is computed with 64-bit integer
// arithmetic and must match exactly, 2 cycles after the input.
module tb_cmpy;
  import ddc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, in_valid, out_valid;
  dds_sample_t  a, b;
  logic [63:0]  out_data;

  cmpy dut (.*);

  int checks = 0, failures = 0, cycle = 0, n_clip = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int due; longint re; longint im; } exp_t;
  exp_t q[$];

  function automatic longint clip32(input longint x);
    if (x > 64'sd2147483647) return 64'sd2147483647;
    if (x < -64'sd2147483648) return -64'sd2147483648;
    return x;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      e = q.pop_front();
      if (e.due != cycle || longint'($signed(out_data[31:0])) != e.re ||
          longint'($signed(out_data[63:32])) != e.im) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %0d %0d exp %0d %0d (due %0d)", cycle,
                                    $signed(out_data[31:0]), $signed(out_data[63:32]), e.re, e.im, e.due);
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      in_valid = (n < 4) || ($urandom_range(0, 7) != 0);
      if (n < 4) begin
        // full-scale corners: (-32768)^2 * 2 exceeds 32 bits and must clip
        a.re = -16'sd32768; a.im = (n[0]) ? 16'sd32767 : -16'sd32768;
        b.re = -16'sd32768; b.im = (n[1]) ? 16'sd32767 : -16'sd32768;
      end else begin
        a.re = 16'($urandom_range(0, 65534) - 32767); a.im = 16'($urandom_range(0, 65534) - 32767);
        b.re = 16'($urandom_range(0, 65534) - 32767); b.im = 16'($urandom_range(0, 65534) - 32767);
      end
      if (in_valid) begin
        exp_t e;
        longint re, im;
        re = longint'(a.re) * longint'(b.re) + longint'(a.im) * longint'(b.im);
        im = longint'(a.im) * longint'(b.re) - longint'(a.re) * longint'(b.im);
        if (clip32(re) != re || clip32(im) != im) n_clip++;
        e.due = cycle + 2; e.re = clip32(re); e.im = clip32(im);
        q.push_back(e);
      end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_clip == 0) begin
      failures++;
      $display("leftover %0d clipped %0d", q.size(), n_clip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
