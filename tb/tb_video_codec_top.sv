// tb_video_codec_top: end-to-end testbench of the compression/decompression
// pipeline at its default 5:6:5 split, streaming whole 1920x1080 frames.
//
// Three synthetic frames are sent: uniform random noise, smooth colour
// gradients and flat colour fields with light noise (the case where the
// quantisation is most visible). Each frame starts with tuser and ends each
// line with tlast, as AXI4-Stream video does. The first line of every frame
// is sent at full rate with the output always ready; the rest of the frame
// has random gaps at the source and random backpressure at the sink.
//
// Checked for every pixel: the encoded 16-bit word between the cores, the
// reconstructed 24-bit pixel (worked out arithmetically as kept*step +
// step/2), the sideband bits, and that red and blue are at most 4 and green at
// most 2 away from the original. Checked per frame: the average error per
// pixel, mean(|dR|+|dG|+|dB|)/3/256*100 percent, is below 1 percent; the first
// line is accepted at one pixel per clock; and a pixel whose path saw no
// backpressure leaves exactly two clocks after it entered. The run fails if
// output stalls, source gaps, input backpressure, frame starts or line ends
// never occurred.
module tb_video_codec_top;
  localparam int WIDTH  = 1920;
  localparam int HEIGHT = 1080;
  localparam int FRAMES = 3;
  localparam int FRAME  = WIDTH * HEIGHT;
  localparam int TOTAL  = FRAMES * FRAME;

  logic        clk = 0, rstn = 0;
  logic [23:0] s_data;
  logic        s_valid, s_user, s_last, s_ready;
  logic [23:0] m_data;
  logic        m_valid, m_ready, m_user, m_last;
  logic [15:0] enc_data;
  logic        enc_valid, enc_ready;

  always #5 clk = ~clk;

  video_codec_top dut (
    .aclk(clk), .aresetn(rstn),
    .s_axis_video_tdata(s_data), .s_axis_video_tvalid(s_valid),
    .s_axis_video_tready(s_ready), .s_axis_video_tuser(s_user),
    .s_axis_video_tlast(s_last),
    .m_axis_video_tdata(m_data), .m_axis_video_tvalid(m_valid),
    .m_axis_video_tready(m_ready), .m_axis_video_tuser(m_user),
    .m_axis_video_tlast(m_last),
    .enc_tdata(enc_data), .enc_tvalid(enc_valid), .enc_tready(enc_ready)
  );

  int checks = 0, failures = 0;
  int cycle = 0, sent = 0, recv = 0, enc_seen = 0;
  int last_backpressure = -1;
  int n_stall = 0, n_gap = 0, n_in_bp = 0, n_sof = 0, n_eol = 0;
  int first_acc, line0_ok = 0;
  real err_sum;
  logic [23:0] orig_q[$];
  int          acc_q[$];

  // Pixel x,y of frame f.
  function automatic logic [23:0] gen_pixel(int f, int x, int y);
    logic [7:0] r, g, b;
    case (f % 3)
      0: {r, g, b} = 24'($urandom());
      1: begin
        r = 8'((x * 255) / (WIDTH - 1));
        g = 8'((y * 255) / (HEIGHT - 1));
        b = 8'(((x + y) * 255) / (WIDTH + HEIGHT - 2));
      end
      default: begin
        r = 8'(((x / 480) * 60 + 20) + $urandom_range(3));
        g = 8'(((y / 270) * 50 + 30) + $urandom_range(3));
        b = 8'(200 - (x / 480) * 40 + $urandom_range(3));
      end
    endcase
    return {r, g, b};
  endfunction

  function automatic int absdiff(logic [7:0] a, logic [7:0] b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
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
      if (!m_ready) last_backpressure = cycle;
      if (m_valid && !m_ready) n_stall++;
      if (s_valid && !s_ready) n_in_bp++;
      // encoded stream between the cores
      if (enc_valid && enc_ready) begin
        logic [23:0] o;
        o = orig_q[enc_seen - recv];
        check(enc_data == 16'((int'(o[23:16]) / 8) * 2048 + (int'(o[15:8]) / 4) * 32 +
                             int'(o[7:0]) / 8),
              "encoded 5:6:5 word");
        enc_seen++;
      end
      // output stream
      if (m_valid && m_ready) begin
        logic [23:0] o;
        int a, x, y, dr, dg, db;
        o = orig_q.pop_front();
        a = acc_q.pop_front();
        x = recv % WIDTH;
        y = (recv % FRAME) / WIDTH;
        check(int'(m_data[23:16]) == (int'(o[23:16]) / 8) * 8 + 4, "red");
        check(int'(m_data[15:8]) == (int'(o[15:8]) / 4) * 4 + 2, "green");
        check(int'(m_data[7:0]) == (int'(o[7:0]) / 8) * 8 + 4, "blue");
        dr = absdiff(m_data[23:16], o[23:16]);
        dg = absdiff(m_data[15:8],  o[15:8]);
        db = absdiff(m_data[7:0],   o[7:0]);
        check(dr <= 4 && dg <= 2 && db <= 4, "error bound");
        err_sum += real'(dr + dg + db) / 3.0 / 256.0 * 100.0;
        check(m_user == (x == 0 && y == 0), "start of frame");
        check(m_last == (x == WIDTH - 1), "end of line");
        if (m_user) n_sof++;
        if (m_last) n_eol++;
        if (last_backpressure < a) check(cycle - a == 2, "latency of two clocks");
        recv++;
        if (recv % FRAME == 0) begin
          real avg;
          avg = err_sum / real'(FRAME);
          $display("frame %0d: average error per pixel %f %%", recv / FRAME - 1, avg);
          check(avg < 1.0, "average error below 1 percent");
          err_sum = 0.0;
        end
      end
      // source
      if (s_valid && s_ready) begin
        int x;
        x = sent % FRAME;
        orig_q.push_back(s_data);
        acc_q.push_back(cycle);
        if (x == 0) first_acc = cycle;
        if (x == WIDTH - 1) begin
          check(cycle - first_acc == WIDTH - 1, "first line at one pixel per clock");
          line0_ok++;
        end
        sent++;
      end else if (s_ready && !s_valid && sent > 0 && sent < TOTAL) n_gap++;
      if (!(s_valid && !s_ready)) begin
        int p, f, x, y;
        f = sent / FRAME;
        p = sent % FRAME;
        x = p % WIDTH;
        y = p / WIDTH;
        if (sent < TOTAL && (y == 0 || $urandom_range(7) != 0)) begin
          s_valid <= 1;
          s_data  <= gen_pixel(f, x, y);
          s_user  <= (p == 0);
          s_last  <= (x == WIDTH - 1);
        end else s_valid <= 0;
      end
      m_ready <= (sent < TOTAL && (sent % FRAME) / WIDTH == 0) ? 1'b1
                                                              : ($urandom_range(7) != 0);
    end
  end

  initial begin
    err_sum = 0.0;
    s_valid = 0; s_data = 0; s_user = 0; s_last = 0; m_ready = 1;
    repeat (3) @(posedge clk);
    rstn <= 1;
    wait (recv == TOTAL);
    repeat (4) @(posedge clk);
    check(!m_valid && !enc_valid, "no extra output");
    check(enc_seen == TOTAL, "every pixel crossed the encoded stream");
    check($bits(enc_data) * 3 == $bits(s_data) * 2, "compression ratio 1.5");
    check(line0_ok == FRAMES, "full-rate first line in every frame");
    check(n_stall > 0, "output stalls happened");
    check(n_gap > 0, "source gaps happened");
    check(n_in_bp > 0, "input backpressure happened");
    check(n_sof == FRAMES, "one start of frame per frame");
    check(n_eol == FRAMES * HEIGHT, "one end of line per line");
    $display("cycles %0d, output stall cycles %0d, source gaps %0d, input backpressure %0d, frames %0d, lines %0d",
             cycle, n_stall, n_gap, n_in_bp, n_sof, n_eol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: a fixed cycle budget, and no more than 10000 clocks without
  // an output pixel.
  initial begin
    int last_recv, idle;
    last_recv = 0;
    idle = 0;
    for (int c = 0; c < 4 * TOTAL && idle < 10000; c++) begin
      @(posedge clk);
      idle = (recv == last_recv) ? idle + 1 : 0;
      last_recv = recv;
    end
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
