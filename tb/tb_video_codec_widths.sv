// tb_video_codec_widths: checks the pipeline at kept-bit splits other than
// the default 5:6:5, as used when trading loss between channels: 6:6:4
// (more compression of blue), 4:4:4 (12-bit words) and 8:8:8 (lossless).
// Each instance receives the same random pixels with random source gaps and
// output backpressure; every output pixel is compared with the value worked
// out arithmetically: floor(v / 2^d) * 2^d + 2^(d-1) for d dropped bits, and v
// itself when d is 0.
module tb_video_codec_widths;
  localparam int N = 20000;
  localparam int NI = 3;
  localparam int RB[NI] = '{6, 4, 8};
  localparam int GB[NI] = '{6, 4, 8};
  localparam int BB[NI] = '{4, 4, 8};

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done[NI];

  function automatic int recon(int v, int kept);
    int d, step;
    d = 8 - kept;
    step = 1 << d;
    return (d == 0) ? v : (v / step) * step + step / 2;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  for (genvar i = 0; i < NI; i++) begin : g_inst
    localparam int EW = RB[i] + GB[i] + BB[i];
    logic [23:0] s_data, m_data;
    logic        s_valid, s_ready, m_valid, m_ready, m_user, m_last;
    logic [EW-1:0] enc_data;
    logic        enc_valid, enc_ready;
    logic [23:0] q[$];
    int sent = 0, recv = 0;

    video_codec_top #(.R_BITS(RB[i]), .G_BITS(GB[i]), .B_BITS(BB[i])) dut (
      .aclk(clk), .aresetn(rstn),
      .s_axis_video_tdata(s_data), .s_axis_video_tvalid(s_valid),
      .s_axis_video_tready(s_ready), .s_axis_video_tuser(1'b0),
      .s_axis_video_tlast(1'b0),
      .m_axis_video_tdata(m_data), .m_axis_video_tvalid(m_valid),
      .m_axis_video_tready(m_ready), .m_axis_video_tuser(m_user),
      .m_axis_video_tlast(m_last),
      .enc_tdata(enc_data), .enc_tvalid(enc_valid), .enc_tready(enc_ready)
    );

    initial begin
      s_valid = 0; s_data = 0; m_ready = 0;
      check(EW == RB[i] + GB[i] + BB[i], "encoded width");
    end

    always @(posedge clk) begin
      if (rstn) begin
        if (m_valid && m_ready) begin
          logic [23:0] o;
          o = q.pop_front();
          check(int'(m_data[23:16]) == recon(int'(o[23:16]), RB[i]) &&
                int'(m_data[15:8])  == recon(int'(o[15:8]),  GB[i]) &&
                int'(m_data[7:0])   == recon(int'(o[7:0]),   BB[i]) &&
                !m_user && !m_last, $sformatf("pixel %0d of split %0d", recv, i));
          recv++;
          if (recv == N) done[i] = 1;
        end
        if (s_valid && s_ready) begin
          q.push_back(s_data);
          sent++;
        end
        if (!(s_valid && !s_ready)) begin
          if (sent < N && $urandom_range(4) != 0) begin
            s_valid <= 1;
            s_data  <= 24'($urandom());
          end else s_valid <= 0;
        end
        m_ready <= ($urandom_range(4) != 0);
      end
    end
  end

  initial begin
    foreach (done[i]) done[i] = 0;
    repeat (3) @(posedge clk);
    rstn <= 1;
    wait (done[0] == 1 && done[1] == 1 && done[2] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
