// disparity_gen: running disparity generation.
//
// A code group's disparity is the count of ones less the count of zeros.
// Every six-bit sub-block has disparity 0 or +-2 and every four-bit one 0 or
// +-2; a non-zero sub-block always has the sign opposite to the running
// disparity it was chosen for, so it flips the running disparity, and a
// balanced one leaves it unchanged. This block therefore needs only to know
// which input values give unbalanced sub-blocks, not the codes themselves:
//   6b: x = 0, 1, 2, 4, 8, 15, 16, 23, 24, 27, 29, 30, 31, and K.28
//   4b: y = 0, 4, 7 (data and special characters alike)
// That the encoder feeds its running disparity back from one character to the
// next is the document's; this way of computing it is this design's own.
//
// Interface: purely combinational. rd_mid is the disparity at the boundary of
// the two sub-blocks (what the 3b/4b table uses); rd_out the disparity after
// the whole character, which the encoder registers as Rdout.
module disparity_gen
  import enc8b10b_pkg::*;
(
  input  logic [7:0] din8,   // HGFEDCBA
  input  logic       kvalid, // special character being sent
  input  rd_t        rd_in,
  output rd_t        rd_mid,
  output rd_t        rd_out
);

  logic flip6, flip4;

  always_comb begin
    flip6 = (din8[4:0] inside {5'd0, 5'd1, 5'd2, 5'd4, 5'd8, 5'd15, 5'd16,
                                5'd23, 5'd24, 5'd27, 5'd29, 5'd30, 5'd31})
            || (kvalid && din8[4:0] == 5'd28);
    flip4 = din8[7:5] inside {3'd0, 3'd4, 3'd7};
    rd_mid = rd_t'(rd_in ^ flip6);
    rd_out = rd_t'(rd_mid ^ flip4);
  end

endmodule
