// tb_iq_combiner -- self-checking testbench for the I/Q combiner.
// Random I/Q pairs with random gaps; each output word must be {Q, I} one
// cycle later, and tlast must mark every frame_len-th word (frame lengths
// 5, 1 and 0, the last treated as 1).
module tb_iq_combiner;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, i_valid, q_valid, m_tvalid, m_tlast;
  logic signed [15:0] i_data, q_data;
  logic [31:0]        frame_len, m_tdata;

  iq_combiner dut (.*);

  int checks = 0, failures = 0, n_last = 0;
  typedef struct { logic [31:0] d; bit last; } exp_t;
  exp_t q[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (m_tvalid) begin
        exp_t e;
        checks++;
        e = q.pop_front();
        if (m_tlast) n_last++;
        if (m_tdata !== e.d || m_tlast !== e.last) begin
          failures++;
          if (failures < 10) $display("got %h/%0b exp %h/%0b", m_tdata, m_tlast, e.d, e.last);
        end
      end else if (m_tlast) begin
        failures++; $display("tlast without tvalid");
      end
    end
  end

  int cnt = 0;  // model of the word counter, kept across frame-length changes

  task automatic run(input int flen, input int n);
    frame_len = 32'(flen);
    for (int k = 0; k < n; k++) begin
      i_valid = ($urandom_range(0, 2) != 0);
      q_valid = i_valid;
      i_data = 16'($urandom); q_data = 16'($urandom);
      if (i_valid) begin
        exp_t e;
        e.d = {q_data, i_data};
        cnt++;
        e.last = (cnt >= (flen == 0 ? 1 : flen));
        if (e.last) cnt = 0;
        q.push_back(e);
      end
      @(posedge clk);
      #1;
    end
    i_valid = 0; q_valid = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 0; i_valid = 0; q_valid = 0; i_data = 0; q_data = 0; frame_len = 5;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(5, 301);      // ends inside a frame: the count carries over
    run(1, 50);
    run(0, 50);
    checks++;
    if (n_last < 60) begin failures++; $display("only %0d frames", n_last); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
