// tb_rgb_compress: self-checking testbench of the compression core.
// Sends sweeps of every value of each channel and then random pixels, each
// with random start-of-frame and end-of-line bits. Expected words are worked
// out arithmetically (red/8, green/4, blue/8 packed as r*2048 + g*32 + b), not
// by slicing as the core does. Phase 1 holds tvalid and tready high and checks
// one clock of latency and one pixel per clock; phase 2 randomises both to
// exercise stalls, and checks that a stalled output word is held.
module tb_rgb_compress;
  localparam int N_FULL = 2000;   // pixels sent at full rate
  localparam int N_RAND = 20000;  // pixels sent with random gaps and stalls
  localparam int N_ALL  = N_FULL + N_RAND;

  logic        clk = 0, rstn = 0;
  logic [23:0] s_data;
  logic        s_valid, s_user, s_last;
  logic        s_ready;
  logic [15:0] m_data;
  logic        m_valid, m_ready, m_user, m_last;

  always #5 clk = ~clk;

  rgb_compress dut (
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
  logic [17:0] exp_q[$];   // {user, last, word}
  int          acc_q[$];   // cycle in which each pixel was accepted
  logic [15:0] held_data;
  logic        held_valid = 0;

  function automatic logic [23:0] gen_pixel(int i);
    logic [23:0] p;
    p = 24'($urandom());
    if (i < 256)      p[23:16] = i[7:0];
    else if (i < 512) p[15:8]  = i[7:0];
    else if (i < 768) p[7:0]   = i[7:0];
    return p;
  endfunction

  function automatic logic [15:0] model(logic [23:0] p);
    int r, g, b;
    r = int'(p[23:16]) / 8;
    g = int'(p[15:8]) / 4;
    b = int'(p[7:0]) / 8;
    return 16'(r * 2048 + g * 32 + b);
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
        logic [17:0] e;
        int a;
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        check(m_data == e[15:0], "encoded word");
        check(m_user == e[17] && m_last == e[16], "sideband");
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
          s_data  <= gen_pixel(n);
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
