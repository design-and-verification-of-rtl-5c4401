// enc8b10b_pkg: types shared by the 8b/10b encoder blocks.
//
// A ten-bit code group is written "abcdei fghj": a six-bit sub-block that
// carries the five low data bits (EDCBA) and a four-bit sub-block that
// carries the three high data bits (HGF). Inside the encoder the sub-blocks
// are held in that written order, most significant bit first, so code6_t[5]
// is line a and code6_t[0] is line i; code4_t[3] is f and code4_t[0] is j.
//
// Running disparity is a single bit. The encoding 0 = negative, 1 = positive
// is a choice of this design; the encoder starts from negative disparity
// after reset, as is usual for this code.
package enc8b10b_pkg;

  typedef logic [5:0] code6_t;   // abcdei
  typedef logic [3:0] code4_t;   // fghj
  typedef logic [9:0] code10_t;  // abcdei fghj, a = bit 9

  typedef enum logic {
    RD_NEG = 1'b0,
    RD_POS = 1'b1
  } rd_t;

endpackage
