// tb_rgb_decompress: self-checking testbench of the decompression core.
// Sends every one of the 65536 RGB 5:6:5 words, each with random
// start-of-frame and end-of-line bits. Expected pixels are worked out
// arithmetically (red = r5*8 + 4, green = g6*4 + 2, blue = b5*8 + 4), not by
// concatenation as the core does. Phase 1 holds tvalid and tready high and
// checks one clock of latency and one pixel per clock; phase 2 randomises
// both to exercise stalls, and checks that a stalled output pixel is held.
module tb_rgb_decompress;
  localparam int N_FULL = 2000;   // pixels sent at full rate
  localparam int N_RAND = 65536 - N_FULL;  // words sent with random gaps and stalls
  localparam int N_ALL  = N_FULL + N_RAND;

  logic        clk = 0, rstn = 0;
  logic [15:0] s_data;
  logic        s_valid, s_user, s_last;
  logic        s_ready;
  logic [23:0] m_data;
  logic        m_valid, m_ready, m_user, m_last;

  always #5 clk = ~clk;

  rgb_decompress dut (
    .aclk(clk), .aresetn(rstn),
    .s_axis_tdata(s_data), .s_axis_tvalid(s_valid), .s_axis_tready(s_ready),
    .s_axis_tuser(s_user), .s_axis_tlast(s_last),
    .m_axis_tdata(m_data), .m_axis_tvalid(m_valid), .m_axis_tready(m_ready),
    .m_axis_tuser(m_user), .m_axis_tlast(m_last)
  );

  int checks = 0, failures = 0;
  int cycle = 0, sent = 0, recv = 0;
  int full_first = -1, full_last = -1;
  int stalls = 0;
  logic [25:0] exp_q[$];   // {user, last, pixel}
  int          acc_q[$];   // cycle in which each pixel was accepted
  logic [23:0] held_data;
  logic        held_valid = 0;

  // Words in order, so that all 65536 are sent exactly once.
  function automatic logic [15:0] gen_word(int i);
    return 16'(i);
  endfunction

  function automatic logic [23:0] model(logic [15:0] w);
    int r, g, b;
    r = (int'(w) / 2048) * 8 + 4;
    g = ((int'(w) / 32) % 64) * 4 + 2;
    b = (int'(w) % 32) * 8 + 4;
    return 24'(r * 65536 + g * 256 + b);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rstn) begin
      cycle <= cycle + 1;
      // output side
      if (held_valid) check(m_valid && m_data == held_data, "stalled word held");
      if (m_valid && !m_ready) begin
        held_valid <= 1; held_data <= m_data; stalls++;
      end else held_valid <= 0;
      if (m_valid && m_ready) begin
        logic [25:0] e;
        int a;
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        check(m_data == e[23:0], "reconstructed pixel");
        check(m_user == e[25] && m_last == e[24], "sideband");
        if (recv < N_FULL) check(cycle - a == 1, "latency of one clock");
        if (recv == 0) full_first = cycle;
        if (recv == N_FULL - 1) full_last = cycle;
        recv++;
      end
      // input side
      if (s_valid && s_ready) begin
        exp_q.push_back({s_user, s_last, model(s_data)});
        acc_q.push_back(cycle);
        sent++;
      end
      if (!(s_valid && !s_ready)) begin
        int n;
        n = sent;  // already counts a pixel accepted at this edge
        if (n < N_ALL && (n < N_FULL || $urandom_range(3) != 0)) begin
          s_valid <= 1;
          s_data  <= gen_word(n);
          s_user  <= 1'($urandom_range(1));
          s_last  <= 1'($urandom_range(1));
        end else s_valid <= 0;
      end
      m_ready <= (recv < N_FULL) ? 1'b1 : ($urandom_range(2) != 0);
    end
  end

  initial begin
    s_valid = 0; s_data = 0; s_user = 0; s_last = 0; m_ready = 1;
    repeat (3) @(posedge clk);
    rstn = 1;
    wait (recv == N_ALL);
    repeat (3) @(posedge clk);
    check(!m_valid, "no extra output");
    check(full_last - full_first == N_FULL - 1, "one pixel per clock");
    check(stalls > 0, "stalls exercised");
    $display("stalled cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
