// slmc_pkg: types and constants shared by the scalable multi-link image link.
//
// The link carries each lane's compressed sub-image as frames of 8b/10b
// characters. A character is an 8-bit value plus a control flag (k); control
// characters delimit frames. The character assignment below is this design's
// own choice, borrowed from the Gigabit Ethernet PCS where one exists:
//   K28.5  idle / comma, used by the receiver for word alignment
//   K27.7  start of frame
//   K29.7  end of frame, more frames of this sub-image follow
//   K28.0  end of frame, last frame of the sub-image
//   K23.7  fill, sent inside a frame while the transmit buffer is empty
// A frame is: SOF, lane id, sequence number, payload bytes, checksum, end.
// The checksum is the 8-bit sum of the payload bytes.
// The compressed payload is a run-length token stream: a count byte (1..255)
// followed by the pixel value.
package slmc_pkg;

  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] K27_7 = 8'hFB;
  localparam logic [7:0] K29_7 = 8'hFD;
  localparam logic [7:0] K28_0 = 8'h1C;
  localparam logic [7:0] K23_7 = 8'hF7;

  // 10-bit codes of K28.5 for each running disparity (abcdei fghj, a first).
  localparam logic [9:0] COMMA_NEG = 10'b0011111010;
  localparam logic [9:0] COMMA_POS = 10'b1100000101;

  // One run-length token: the run of 'count' equal pixels of value 'value'.
  // 'last' marks the final token of a sub-image.
  typedef struct packed {
    logic       last;
    logic [7:0] count;
    logic [7:0] value;
  } rle_token_t;

  // Per-lane receive status reported by the frame checker and the controller.
  typedef struct packed {
    logic        aligned;
    logic        overflow;
    logic        image_end;
    logic [15:0] frames_ok;
    logic [7:0]  csum_errs;
    logic [7:0]  hdr_errs;
    logic [7:0]  frame_errs;
    logic [7:0]  code_errs;
  } lane_status_t;

endpackage
