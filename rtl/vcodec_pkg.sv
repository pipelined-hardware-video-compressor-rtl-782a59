// vcodec_pkg: types and constants shared by the RGB 5:6:5 video compression
// and decompression cores.
//
// A video pixel travels as a 24-bit AXI4-Stream word with red in bits 23:16,
// green in bits 15:8 and blue in bits 7:0 (the bit map of the compression
// scheme). The compressed word keeps the top R_KEEP, G_KEEP and B_KEEP bits of
// the three channels, packed red-green-blue from the most significant end:
// with the default 5:6:5 split that is red in 15:11, green in 10:5 and blue in
// 4:0, a fixed 16-bit word, i.e. two thirds of the original storage.
// The 5:6:5 split and the bit positions follow the scheme this design
// implements; making the kept widths parameters is this design's own choice.
package vcodec_pkg;

  // Bits per colour channel of the uncompressed pixel.
  localparam int unsigned CHAN_W = 8;
  // Bits per uncompressed pixel.
  localparam int unsigned PIX_W  = 3 * CHAN_W;

  // Default number of most significant bits kept per channel (RGB 5:6:5).
  localparam int unsigned R_KEEP = 5;
  localparam int unsigned G_KEEP = 6;
  localparam int unsigned B_KEEP = 5;

  // Uncompressed pixel, red in the most significant byte.
  typedef struct packed {
    logic [CHAN_W-1:0] r;
    logic [CHAN_W-1:0] g;
    logic [CHAN_W-1:0] b;
  } rgb888_t;

  // Compressed pixel at the default split.
  typedef struct packed {
    logic [R_KEEP-1:0] r;
    logic [G_KEEP-1:0] g;
    logic [B_KEEP-1:0] b;
  } rgb565_t;

  // Value appended below the kept bits of a channel on decompression: the
  // middle of the range of the dropped bits, a one followed by zeros
  // ("100" for three dropped bits, "10" for two). Zero when nothing was dropped.
  function automatic logic [CHAN_W-1:0] fill_value(int unsigned dropped);
    logic [CHAN_W-1:0] v;
    v = '0;
    if (dropped > 0) v[dropped-1] = 1'b1;
    return v;
  endfunction

endpackage
