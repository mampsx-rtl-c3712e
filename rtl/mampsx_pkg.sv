// mampsx_pkg: types and constants shared by the communication assists, the
// stream interconnect and the FFoS accelerators.
//
// Every link between tiles carries 32-bit words (the width of the stream
// interconnect). An image row of W one-bit pixels is packed into
// ceil(W/32) words, least significant bit = leftmost pixel; a 120-pixel row
// therefore takes 4 words and a 120x45 binary image 180 words. The image size
// 120x45 is the typical frame of the FFoS application; the packing order
// inside a word is this design's own choice.
package mampsx_pkg;

  // Width of one stream word (interconnect width N).
  localparam int unsigned WORD_W = 32;
  typedef logic [WORD_W-1:0] word_t;

  // Typical FFoS frame (W x H) and derived word counts.
  localparam int unsigned IMG_W = 120;
  localparam int unsigned IMG_H = 45;

  // Number of 32-bit words that hold one packed row of w one-bit pixels.
  function automatic int unsigned row_words(int unsigned w);
    return (w + WORD_W - 1) / WORD_W;
  endfunction

  // Centre coordinates sent to the sink: one 16-bit token per centre,
  // {row[7:0], column[7:0]}; all ones marks "no centre".
  typedef struct packed {
    logic [7:0] row;
    logic [7:0] col;
  } center_t;

  localparam center_t NO_CENTER = '{row: 8'hFF, col: 8'hFF};

endpackage
