// rgb_compress: compression core. Turns a 24-bit RGB 8:8:8 video stream into
// a stream of fixed-size RGB 5:6:5 words by keeping only the most significant
// bits of each channel (5 of red, 6 of green, 5 of blue by default). Because
// every encoded pixel has the same size, the core is fully pipelineable and a
// buffer behind it needs two thirds of the memory of the raw stream.
//
// Interface: AXI4-Stream video in and out (tdata, tvalid, tready, tuser =
// start of frame, tlast = end of line), active-low synchronous reset aresetn.
// Input tdata holds red in 23:16, green in 15:8, blue in 7:0; output tdata
// holds the kept bits packed red-green-blue from the most significant end.
//
// Timing: one register stage. A pixel accepted on one rising edge of aclk is
// presented on the output from that edge on, so the core adds one clock of
// latency and sustains one pixel per clock. s_axis_tready is high whenever the
// output register is empty or being emptied in the same cycle.
//
// The quantisation (drop the three least significant bits of red and blue and
// the two of green) and the one-cycle computation follow the scheme this
// design implements. The AXI4-Stream handshake, the sideband bits, the reset
// and the per-channel width parameters are this design's own choices.
module rgb_compress
  import vcodec_pkg::*;
#(
  parameter int unsigned R_BITS = R_KEEP,  // kept bits of red
  parameter int unsigned G_BITS = G_KEEP,  // kept bits of green
  parameter int unsigned B_BITS = B_KEEP,  // kept bits of blue
  localparam int unsigned ENC_W = R_BITS + G_BITS + B_BITS
) (
  input  logic             aclk,
  input  logic             aresetn,
  // raw RGB 8:8:8 stream
  input  logic [PIX_W-1:0] s_axis_tdata,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  input  logic             s_axis_tuser,
  input  logic             s_axis_tlast,
  // encoded stream
  output logic [ENC_W-1:0] m_axis_tdata,
  output logic             m_axis_tvalid,
  input  logic             m_axis_tready,
  output logic             m_axis_tuser,
  output logic             m_axis_tlast
);

  rgb888_t          pix;
  logic [ENC_W-1:0] enc;

  assign pix = rgb888_t'(s_axis_tdata);
  // Keep the top bits of each channel and pack them red-green-blue.
  assign enc = {pix.r[CHAN_W-1 -: R_BITS],
                pix.g[CHAN_W-1 -: G_BITS],
                pix.b[CHAN_W-1 -: B_BITS]};

  assign s_axis_tready = !m_axis_tvalid || m_axis_tready;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tuser  <= 1'b0;
      m_axis_tlast  <= 1'b0;
    end else if (s_axis_tready) begin
      m_axis_tvalid <= s_axis_tvalid;
      if (s_axis_tvalid) begin
        m_axis_tdata <= enc;
        m_axis_tuser <= s_axis_tuser;
        m_axis_tlast <= s_axis_tlast;
      end
    end
  end

  // Each channel keeps between one and all of its bits.
  initial begin
    assert (R_BITS >= 1 && R_BITS <= CHAN_W) else $error("R_BITS out of range");
    assert (G_BITS >= 1 && G_BITS <= CHAN_W) else $error("G_BITS out of range");
    assert (B_BITS >= 1 && B_BITS <= CHAN_W) else $error("B_BITS out of range");
  end

  // AXI4-Stream rule for the source: a pixel offered and not taken stays
  // offered, unchanged, until it is taken.
  a_hold_input: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axis_tvalid && !s_axis_tready |=> s_axis_tvalid &&
      $stable(s_axis_tdata) && $stable(s_axis_tuser) && $stable(s_axis_tlast))
    else $error("rgb_compress: input changed while stalled");

endmodule
