// lcell_pkg: widths, encodings and small helpers shared by the L-cell data
// movement hardware (S-buffer, shifter controllers, address translation).
//
// The 8-bit word and link width and the 512-byte S-buffer page follow the
// source design. The 16-bit flow-number registers, the 16-bit CPU address and
// the little-endian two-byte S-image header are this design's own choices.
package lcell_pkg;

  // Width of a buffer word and of the lateral links between L-cells.
  localparam int unsigned DATA_W = 8;
  // Width of the word count carried in the two-byte S-image header.
  localparam int unsigned WC_W   = 16;
  // Number of header bytes at the front of every S-image.
  localparam int unsigned HDR_BYTES = 2;

  // Buffer access requested by a shifter.
  typedef enum logic {
    BUF_READ  = 1'b0,
    BUF_WRITE = 1'b1
  } buf_op_e;

  // Which port of the L-cell a shifter serves. The two shifters are the same
  // hardware; only the polarity of the flow number differs.
  typedef enum logic {
    SIDE_LEFT  = 1'b0,
    SIDE_RIGHT = 1'b1
  } side_e;

endpackage
