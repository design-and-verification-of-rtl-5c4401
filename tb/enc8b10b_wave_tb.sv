// enc8b10b_wave_tb: the two short input sequences of the encoder's published
// waveforms, replayed with RdIn held at 0 (negative disparity), as there.
//
//   control sequence, kin = 1: 10011001, 11111111, 00000001, 11110111,
//     11111011. The first three are not special characters and must raise
//     kerr; 11110111 is K23.7 and 11111011 is K27.7.
//   data sequence, kin = 0: 10000001, 00001001, 01100011, 00001101, i.e.
//     D.1.4, D.9.0, D.3.3, D.13.0.
//
// Each byte is held for one clock. The expected codes are written out here
// by hand from the code tables (abcdei fghj at negative running disparity,
// the 4b part at the disparity left by the 6b part) and each output is
// checked two clock edges after its byte was applied, together with kerr
// and Rdout.
module enc8b10b_wave_tb;

  logic       clk;
  logic       rst;
  logic [7:0] In8b;
  logic       kin;
  logic       RdIn;
  logic [9:0] out10b;
  logic       kerr;
  logic       Rdout;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  enc8b10b dut (
    .clk(clk), .rst(rst), .In8b(In8b), .kin(kin), .RdIn(RdIn),
    .out10b(out10b), .kerr(kerr), .Rdout(Rdout)
  );

  typedef struct {
    logic [7:0] b;
    logic       k;
    logic [9:0] code;
    logic       kerr;
    logic       rd;
  } vec_t;

  localparam int N = 9;
  vec_t vecs [N] = '{
    // control sequence
    '{8'b10011001, 1'b1, 10'b100110_1101, 1'b1, 1'b1},  // D.25.4: kerr, sent as data
    '{8'b11111111, 1'b1, 10'b101011_0001, 1'b1, 1'b0},  // D.31.7 (P7): kerr
    '{8'b00000001, 1'b1, 10'b011101_0100, 1'b1, 1'b0},  // D.1.0: kerr
    '{8'b11110111, 1'b1, 10'b111010_1000, 1'b0, 1'b0},  // K23.7
    '{8'b11111011, 1'b1, 10'b110110_1000, 1'b0, 1'b0},  // K27.7
    // data sequence
    '{8'b10000001, 1'b0, 10'b011101_0010, 1'b0, 1'b0},  // D.1.4
    '{8'b00001001, 1'b0, 10'b100101_1011, 1'b0, 1'b1},  // D.9.0
    '{8'b01100011, 1'b0, 10'b110001_1100, 1'b0, 1'b0},  // D.3.3
    '{8'b00001101, 1'b0, 10'b101100_1011, 1'b0, 1'b1}   // D.13.0
  };

  int checks = 0, failures = 0;
  int n_kerr = 0, n_special = 0;
  vec_t v;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: out10b=%b kerr=%0d Rdout=%0d", what, out10b, kerr, Rdout);
    end
  endtask

  initial begin
    RdIn = 1'b0;
    rst = 1'b1; In8b = '0; kin = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i <= N; i++) begin
      if (i < N) begin In8b = vecs[i].b; kin = vecs[i].k; end
      else begin In8b = '0; kin = 1'b0; end
      @(negedge clk);
      // byte i-1 was captured on the last edge but one, its code registered
      // on the last edge
      if (i >= 1) begin
        v = vecs[i-1];
        check(out10b == v.code, $sformatf("code of vector %0d", i-1));
        check(kerr == v.kerr, $sformatf("kerr of vector %0d", i-1));
        check(Rdout == v.rd, $sformatf("Rdout of vector %0d", i-1));
        if (kerr) n_kerr++;
        if (v.k && !v.kerr && out10b == v.code) n_special++;
      end
    end
    check(n_kerr == 3, "three kerr");
    check(n_special == 2, "two special characters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
