// rgb_decompress: decompression core. Turns a stream of RGB 5:6:5 words back
// into 24-bit RGB 8:8:8 pixels. The kept bits of each channel become its most
// significant bits and the dropped bits are replaced by the middle of their
// range, a one followed by zeros: "100" below the five bits of red and blue,
// "10" below the six bits of green. The reconstructed channel is then never
// more than 4 (red, blue) or 2 (green) away from the original value.
//
// Interface: AXI4-Stream video in and out (tdata, tvalid, tready, tuser =
// start of frame, tlast = end of line), active-low synchronous reset aresetn.
// Input tdata is packed red-green-blue from the most significant end; output
// tdata holds red in 23:16, green in 15:8, blue in 7:0.
//
// Timing: one register stage, one clock of latency, one pixel per clock;
// s_axis_tready is high whenever the output register is empty or being
// emptied in the same cycle. The zero bits of the fill values are constant
// outputs by construction (five of the 24 output bits at the default split).
//
// The mid-range fill values and the bit positions follow the scheme this
// design implements. The AXI4-Stream handshake, the sideband bits, the reset,
// the one-cycle register and the per-channel width parameters are this
// design's own choices.
module rgb_decompress
  import vcodec_pkg::*;
#(
  parameter int unsigned R_BITS = R_KEEP,  // kept bits of red
  parameter int unsigned G_BITS = G_KEEP,  // kept bits of green
  parameter int unsigned B_BITS = B_KEEP,  // kept bits of blue
  localparam int unsigned ENC_W = R_BITS + G_BITS + B_BITS
) (
  input  logic             aclk,
  input  logic             aresetn,
  // encoded stream
  input  logic [ENC_W-1:0] s_axis_tdata,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  input  logic             s_axis_tuser,
  input  logic             s_axis_tlast,
  // reconstructed RGB 8:8:8 stream
  output logic [PIX_W-1:0] m_axis_tdata,
  output logic             m_axis_tvalid,
  input  logic             m_axis_tready,
  output logic             m_axis_tuser,
  output logic             m_axis_tlast
);

  localparam logic [CHAN_W-1:0] R_FILL = fill_value(CHAN_W - R_BITS);
  localparam logic [CHAN_W-1:0] G_FILL = fill_value(CHAN_W - G_BITS);
  localparam logic [CHAN_W-1:0] B_FILL = fill_value(CHAN_W - B_BITS);

  logic [R_BITS-1:0] r_in;
  logic [G_BITS-1:0] g_in;
  logic [B_BITS-1:0] b_in;
  rgb888_t           pix;

  assign {r_in, g_in, b_in} = s_axis_tdata;

  // Kept bits on top, the fill constant in the dropped positions.
  always_comb begin
    pix.r = R_FILL;
    pix.g = G_FILL;
    pix.b = B_FILL;
    pix.r[CHAN_W-1 -: R_BITS] = r_in;
    pix.g[CHAN_W-1 -: G_BITS] = g_in;
    pix.b[CHAN_W-1 -: B_BITS] = b_in;
  end

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
        m_axis_tdata <= pix;
        m_axis_tuser <= s_axis_tuser;
        m_axis_tlast <= s_axis_tlast;
      end
    end
  end

  initial begin
    assert (R_BITS >= 1 && R_BITS <= CHAN_W) else $error("R_BITS out of range");
    assert (G_BITS >= 1 && G_BITS <= CHAN_W) else $error("G_BITS out of range");
    assert (B_BITS >= 1 && B_BITS <= CHAN_W) else $error("B_BITS out of range");
  end

  // AXI4-Stream rule for the source: a word offered and not taken stays
  // offered, unchanged, until it is taken.
  a_hold_input: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axis_tvalid && !s_axis_tready |=> s_axis_tvalid &&
      $stable(s_axis_tdata) && $stable(s_axis_tuser) && $stable(s_axis_tlast))
    else $error("rgb_decompress: input changed while stalled");

endmodule
