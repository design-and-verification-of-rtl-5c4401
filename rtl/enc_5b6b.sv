// enc_5b6b: the 5b/6b sub-block encoding table.
//
// Maps the five low data bits EDCBA (din5, A = bit 0, so din5 is the number x
// of a D.x character) to the six-bit sub-block abcdei. Each entry holds two
// codes: the one used while the running disparity is negative (more ones, or
// balanced) and the one used while it is positive (more zeros, or balanced).
// For balanced entries the two are equal, except D.7, which has two balanced
// forms (111000 / 000111) so that no run of six equal bits can appear.
//
// Interface: purely combinational. en = 0 forces the output to zero; the
// encoder does this while it sends a special character, whose six bits come
// from the control block instead and are merged with this output bit by bit.
// K.28 is a special character only and is not in this table (D.28 is).
//
// The code values follow the document's 5b/6b table, with the negative
// disparity column being the one with more ones (as its 3b/4b and special
// character tables show). Entry 27 is taken as 110110 / 001001, the values
// the special-character table gives for K.27.7.
module enc_5b6b
  import enc8b10b_pkg::*;
(
  input  logic [4:0] din5,  // EDCBA
  input  rd_t        rd,    // running disparity before this sub-block
  input  logic       en,    // 1 = data character
  output code6_t     code6  // abcdei
);

  code6_t neg_code, pos_code;  // code for rd = negative / positive

  always_comb begin
    unique case (din5)
      5'd0 : begin neg_code = 6'b100111; pos_code = 6'b011000; end
      5'd1 : begin neg_code = 6'b011101; pos_code = 6'b100010; end
      5'd2 : begin neg_code = 6'b101101; pos_code = 6'b010010; end
      5'd3 : begin neg_code = 6'b110001; pos_code = 6'b110001; end
      5'd4 : begin neg_code = 6'b110101; pos_code = 6'b001010; end
      5'd5 : begin neg_code = 6'b101001; pos_code = 6'b101001; end
      5'd6 : begin neg_code = 6'b011001; pos_code = 6'b011001; end
      5'd7 : begin neg_code = 6'b111000; pos_code = 6'b000111; end
      5'd8 : begin neg_code = 6'b111001; pos_code = 6'b000110; end
      5'd9 : begin neg_code = 6'b100101; pos_code = 6'b100101; end
      5'd10: begin neg_code = 6'b010101; pos_code = 6'b010101; end
      5'd11: begin neg_code = 6'b110100; pos_code = 6'b110100; end
      5'd12: begin neg_code = 6'b001101; pos_code = 6'b001101; end
      5'd13: begin neg_code = 6'b101100; pos_code = 6'b101100; end
      5'd14: begin neg_code = 6'b011100; pos_code = 6'b011100; end
      5'd15: begin neg_code = 6'b010111; pos_code = 6'b101000; end
      5'd16: begin neg_code = 6'b011011; pos_code = 6'b100100; end
      5'd17: begin neg_code = 6'b100011; pos_code = 6'b100011; end
      5'd18: begin neg_code = 6'b010011; pos_code = 6'b010011; end
      5'd19: begin neg_code = 6'b110010; pos_code = 6'b110010; end
      5'd20: begin neg_code = 6'b001011; pos_code = 6'b001011; end
      5'd21: begin neg_code = 6'b101010; pos_code = 6'b101010; end
      5'd22: begin neg_code = 6'b011010; pos_code = 6'b011010; end
      5'd23: begin neg_code = 6'b111010; pos_code = 6'b000101; end
      5'd24: begin neg_code = 6'b110011; pos_code = 6'b001100; end
      5'd25: begin neg_code = 6'b100110; pos_code = 6'b100110; end
      5'd26: begin neg_code = 6'b010110; pos_code = 6'b010110; end
      5'd27: begin neg_code = 6'b110110; pos_code = 6'b001001; end
      5'd28: begin neg_code = 6'b001110; pos_code = 6'b001110; end
      5'd29: begin neg_code = 6'b101110; pos_code = 6'b010001; end
      5'd30: begin neg_code = 6'b011110; pos_code = 6'b100001; end
      5'd31: begin neg_code = 6'b101011; pos_code = 6'b010100; end
      default: begin neg_code = '0; pos_code = '0; end
    endcase
    if (!en)                code6 = '0;
    else if (rd == RD_NEG)  code6 = neg_code;
    else                    code6 = pos_code;
  end

endmodule
