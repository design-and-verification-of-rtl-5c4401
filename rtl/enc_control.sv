// enc_control: special (K) character control.
//
// When kin is 1 the byte must be one of the twelve special characters
// K28.0 .. K28.7, K23.7, K27.7, K29.7 and K30.7. For those the block outputs
// both sub-blocks of the code group straight from the special-character
// table, chosen by the running disparity at the start of the character, and
// raises kvalid so that the two data tables are switched off. Any other byte
// sent with kin = 1 raises kerr; the encoder then sends it as the data
// character with the same bits (kvalid stays 0), a choice of this design,
// which keeps the line stream a valid, balanced code.
//
// The codes follow the document's special-character table. Its K28.0 entry
// for negative disparity is taken as 001111 0100, the value its 3b/4b rules
// give (x.0 after the positive-disparity 001111), not 001111 1000, which is
// the code of K28.7.
//
// Interface: purely combinational. cntl6 / cntl4 are zero unless kvalid.
module enc_control
  import enc8b10b_pkg::*;
(
  input  logic [7:0] din8,   // HGFEDCBA
  input  logic       kin,
  input  rd_t        rd,     // running disparity before the character
  output code6_t     cntl6,  // abcdei of the special character
  output code4_t     cntl4,  // fghj of the special character
  output logic       kvalid, // kin = 1 and din8 is a special character
  output logic       kerr    // kin = 1 and din8 is not
);

  code10_t neg_code, pos_code;  // abcdei fghj for rd negative / positive
  logic    known;

  always_comb begin
    known = 1'b1;
    unique case (din8)
      8'h1C: begin neg_code = 10'b001111_0100; pos_code = 10'b110000_1011; end // K28.0
      8'h3C: begin neg_code = 10'b001111_1001; pos_code = 10'b110000_0110; end // K28.1
      8'h5C: begin neg_code = 10'b001111_0101; pos_code = 10'b110000_1010; end // K28.2
      8'h7C: begin neg_code = 10'b001111_0011; pos_code = 10'b110000_1100; end // K28.3
      8'h9C: begin neg_code = 10'b001111_0010; pos_code = 10'b110000_1101; end // K28.4
      8'hBC: begin neg_code = 10'b001111_1010; pos_code = 10'b110000_0101; end // K28.5
      8'hDC: begin neg_code = 10'b001111_0110; pos_code = 10'b110000_1001; end // K28.6
      8'hFC: begin neg_code = 10'b001111_1000; pos_code = 10'b110000_0111; end // K28.7
      8'hF7: begin neg_code = 10'b111010_1000; pos_code = 10'b000101_0111; end // K23.7
      8'hFB: begin neg_code = 10'b110110_1000; pos_code = 10'b001001_0111; end // K27.7
      8'hFD: begin neg_code = 10'b101110_1000; pos_code = 10'b010001_0111; end // K29.7
      8'hFE: begin neg_code = 10'b011110_1000; pos_code = 10'b100001_0111; end // K30.7
      default: begin neg_code = '0; pos_code = '0; known = 1'b0; end
    endcase
    kvalid = kin & known;
    kerr   = kin & ~known;
    if (!kvalid)              {cntl6, cntl4} = '0;
    else if (rd == RD_NEG)    {cntl6, cntl4} = neg_code;
    else                      {cntl6, cntl4} = pos_code;
  end

endmodule
