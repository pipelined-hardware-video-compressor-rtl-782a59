// video_codec_top: the compression/decompression pipeline of the video path.
// It sits between the frame-buffer read stream (the VDMA's memory-to-stream
// port) and the stream that feeds the video output stage (AXI4-Stream to
// video out, then RGB to DVI/HDMI). Each 24-bit RGB 8:8:8 pixel is quantised
// to a 16-bit RGB 5:6:5 word by rgb_compress and immediately expanded back
// to 24 bits by rgb_decompress, so the output shows exactly the loss the
// compressed format would cause in a buffer while the stream keeps its rate.
//
// Interface: AXI4-Stream video slave s_axis_video_* (24-bit tdata, red in
// 23:16, green in 15:8, blue in 7:0; tuser = start of frame, tlast = end of
// line) and AXI4-Stream video master m_axis_video_* of the same format. The
// encoded stream between the two cores is brought out read-only on enc_* so
// it can be observed, or tapped where a compressed line buffer would sit.
// One clock aclk (the pixel clock) and an active-low synchronous reset.
//
// Timing: two register stages, so a pixel leaves two clocks after it is
// accepted when the output is not stalled; one pixel per clock sustained.
// Backpressure from m_axis_video_tready reaches s_axis_video_tready
// combinationally through both stages.
//
// Feeding the compressor straight into the decompressor, after the frame
// buffer, is the arrangement this design implements; the handshake, the
// observation port and the reset are this design's own choices.
module video_codec_top
  import vcodec_pkg::*;
#(
  parameter int unsigned R_BITS = R_KEEP,  // kept bits of red
  parameter int unsigned G_BITS = G_KEEP,  // kept bits of green
  parameter int unsigned B_BITS = B_KEEP,  // kept bits of blue
  localparam int unsigned ENC_W = R_BITS + G_BITS + B_BITS
) (
  input  logic             aclk,
  input  logic             aresetn,
  // from the frame buffer read port
  input  logic [PIX_W-1:0] s_axis_video_tdata,
  input  logic             s_axis_video_tvalid,
  output logic             s_axis_video_tready,
  input  logic             s_axis_video_tuser,
  input  logic             s_axis_video_tlast,
  // to the video output stage
  output logic [PIX_W-1:0] m_axis_video_tdata,
  output logic             m_axis_video_tvalid,
  input  logic             m_axis_video_tready,
  output logic             m_axis_video_tuser,
  output logic             m_axis_video_tlast,
  // encoded stream between the cores, for observation only
  output logic [ENC_W-1:0] enc_tdata,
  output logic             enc_tvalid,
  output logic             enc_tready
);

  logic enc_tuser, enc_tlast;

  rgb_compress #(
    .R_BITS(R_BITS), .G_BITS(G_BITS), .B_BITS(B_BITS)
  ) u_compress (
    .aclk          (aclk),
    .aresetn       (aresetn),
    .s_axis_tdata  (s_axis_video_tdata),
    .s_axis_tvalid (s_axis_video_tvalid),
    .s_axis_tready (s_axis_video_tready),
    .s_axis_tuser  (s_axis_video_tuser),
    .s_axis_tlast  (s_axis_video_tlast),
    .m_axis_tdata  (enc_tdata),
    .m_axis_tvalid (enc_tvalid),
    .m_axis_tready (enc_tready),
    .m_axis_tuser  (enc_tuser),
    .m_axis_tlast  (enc_tlast)
  );

  rgb_decompress #(
    .R_BITS(R_BITS), .G_BITS(G_BITS), .B_BITS(B_BITS)
  ) u_decompress (
    .aclk          (aclk),
    .aresetn       (aresetn),
    .s_axis_tdata  (enc_tdata),
    .s_axis_tvalid (enc_tvalid),
    .s_axis_tready (enc_tready),
    .s_axis_tuser  (enc_tuser),
    .s_axis_tlast  (enc_tlast),
    .m_axis_tdata  (m_axis_video_tdata),
    .m_axis_tvalid (m_axis_video_tvalid),
    .m_axis_tready (m_axis_video_tready),
    .m_axis_tuser  (m_axis_video_tuser),
    .m_axis_tlast  (m_axis_video_tlast)
  );

endmodule
