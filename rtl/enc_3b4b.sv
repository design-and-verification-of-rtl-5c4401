// enc_3b4b: the 3b/4b sub-block encoding table.
//
// Maps the three high data bits HGF (din3 = byte bits 7:5, F = bit 0, so
// din3 is the number y of a D.x.y character) to the four-bit sub-block fghj.
// The running disparity it uses is the one at the boundary between the two
// sub-blocks, i.e. after the six-bit sub-block of the same character.
//
// y = 7 has two forms: the primary 1110 / 0001 (P7) and the alternate
// 0111 / 1000 (A7). The alternate is used where the primary would put five
// equal bits in a row across the sub-block boundary: with negative disparity
// after D.17, D.18 and D.20 (whose six bits end in "11"), and with positive
// disparity after D.11, D.13 and D.14 (ending in "00"). The document lists
// both forms but not this selection rule; the rule is the standard one for
// this code and is needed to keep runs at most five bits long, which the
// document requires. This is why the table also sees the low five bits.
//
// Interface: purely combinational. en = 0 forces the output to zero, as for
// enc_5b6b, while a special character is sent.
module enc_3b4b
  import enc8b10b_pkg::*;
(
  input  logic [2:0] din3,  // HGF
  input  logic [4:0] din5,  // EDCBA, only for the x.A7 choice
  input  rd_t        rd,    // running disparity after the 6b sub-block
  input  logic       en,    // 1 = data character
  output code4_t     code4  // fghj
);

  code4_t neg_code, pos_code;
  logic   use_a7;

  always_comb begin
    use_a7 = (rd == RD_NEG) ? (din5 inside {5'd17, 5'd18, 5'd20})
                            : (din5 inside {5'd11, 5'd13, 5'd14});
    unique case (din3)
      3'd0: begin neg_code = 4'b1011; pos_code = 4'b0100; end
      3'd1: begin neg_code = 4'b1001; pos_code = 4'b1001; end
      3'd2: begin neg_code = 4'b0101; pos_code = 4'b0101; end
      3'd3: begin neg_code = 4'b1100; pos_code = 4'b0011; end
      3'd4: begin neg_code = 4'b1101; pos_code = 4'b0010; end
      3'd5: begin neg_code = 4'b1010; pos_code = 4'b1010; end
      3'd6: begin neg_code = 4'b0110; pos_code = 4'b0110; end
      3'd7: begin
        if (use_a7) begin neg_code = 4'b0111; pos_code = 4'b1000; end
        else        begin neg_code = 4'b1110; pos_code = 4'b0001; end
      end
      default: begin neg_code = '0; pos_code = '0; end
    endcase
    if (!en)                code4 = '0;
    else if (rd == RD_NEG)  code4 = neg_code;
    else                    code4 = pos_code;
  end

endmodule
