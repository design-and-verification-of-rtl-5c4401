// enc8b10b: pipelined 8b/10b encoder.
//
// Turns one byte per clock into one ten-bit code group that has five, four or
// six ones, so that a serial line sees frequent transitions and stays
// DC-balanced. The byte is split into its low five bits (EDCBA, coded into
// six bits abcdei by enc_5b6b) and its high three bits (HGF, coded into four
// bits fghj by enc_3b4b). When kin is 1 the byte names one of twelve special
// characters, whose code enc_control supplies instead; the data tables are
// then switched off and the two sources are merged bit by bit (one of them is
// always zero). disparity_gen works out the running disparity after the
// character.
//
// Pipeline (as the document draws it): In8b and kin are registered on entry;
// the tables and controls work on the registered byte and on RdIn, which is
// not registered; out10b, kerr and Rdout are registered on exit. A byte
// presented before clock edge n therefore appears on out10b after edge n+1,
// and a new byte can be presented every clock.
//
// Running disparity: Rdout must be wired back to RdIn outside the encoder.
// The loop RdIn -> Rdout holds exactly one register, so each character is
// encoded with the disparity left by the one before it. 1 = positive.
//
// Reset: rst is synchronous and active high (the document does not say which);
// it clears every register, so Rdout starts negative and the first code
// after reset is D.0 until real input has passed the input register.
//
// out10b carries "abcdei fghj" with a in bit 9, i.e. in the order the
// tables are written and the bits are sent; this bit order is this design's
// choice.
module enc8b10b
  import enc8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] In8b,   // HGFEDCBA, A = bit 0
  input  logic       kin,    // 1 = special character
  input  logic       RdIn,   // running disparity, connect to Rdout
  output logic [9:0] out10b, // abcdei fghj, a = bit 9
  output logic       kerr,   // kin = 1 with a byte that is no special character
  output logic       Rdout   // running disparity after out10b
);

  // Input registers
  logic [7:0] in8_q;
  logic       kin_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      in8_q <= '0;
      kin_q <= 1'b0;
    end else begin
      in8_q <= In8b;
      kin_q <= kin;
    end
  end

  // Encoding
  rd_t    rd_in, rd_mid, rd_next;
  code6_t dout_6b, cntl_6b;
  code4_t dout_4b, cntl_4b;
  logic   kvalid, kerr_c;
  code10_t code10;

  assign rd_in = rd_t'(RdIn);

  enc_control u_control (
    .din8  (in8_q),
    .kin   (kin_q),
    .rd    (rd_in),
    .cntl6 (cntl_6b),
    .cntl4 (cntl_4b),
    .kvalid(kvalid),
    .kerr  (kerr_c)
  );

  disparity_gen u_disparity (
    .din8  (in8_q),
    .kvalid(kvalid),
    .rd_in (rd_in),
    .rd_mid(rd_mid),
    .rd_out(rd_next)
  );

  enc_5b6b u_5b6b (
    .din5 (in8_q[4:0]),
    .rd   (rd_in),
    .en   (~kvalid),
    .code6(dout_6b)
  );

  enc_3b4b u_3b4b (
    .din3 (in8_q[7:5]),
    .din5 (in8_q[4:0]),
    .rd   (rd_mid),
    .en   (~kvalid),
    .code4(dout_4b)
  );

  assign code10 = {dout_6b | cntl_6b, dout_4b | cntl_4b};

  // Output registers
  always_ff @(posedge clk) begin
    if (rst) begin
      out10b <= '0;
      kerr   <= 1'b0;
      Rdout  <= RD_NEG;
    end else begin
      out10b <= code10;
      kerr   <= kerr_c;
      Rdout  <= rd_next;
    end
  end

  // Every code group carries four, five or six ones.
  a_balance : assert property (@(posedge clk) disable iff (rst)
    $countones(code10) inside {4, 5, 6});

  // The running disparity changes exactly when the code group is unbalanced.
  a_rd_flip : assert property (@(posedge clk) disable iff (rst)
    ((rd_next != rd_in) == ($countones(code10) != 5)));

endmodule
