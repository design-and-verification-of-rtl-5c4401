// enc_control_tb: exhaustive check of the special-character control.
//
// Applies every byte with kin 0 and 1 and both running disparities. For the
// twelve special characters with kin = 1 the ten-bit code must match the
// reference model and kvalid must be set; for every other combination the
// code must be zero, and kerr must be set exactly when kin = 1. Counts that
// twelve characters were accepted at each disparity. One vector per clock.
module enc_control_tb;
  import enc8b10b_pkg::*;
  import enc_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] din8;
  logic       kin;
  rd_t        rd;
  code6_t     cntl6;
  code4_t     cntl4;
  logic       kvalid, kerr;
  int checks = 0, failures = 0;
  int accepted [2] = '{0, 0};
  ref_t r;

  enc_control dut (.din8(din8), .kin(kin), .rd(rd), .cntl6(cntl6), .cntl4(cntl4),
                   .kvalid(kvalid), .kerr(kerr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: byte=%h kin=%0d rd=%0d code=%b_%b kvalid=%0d kerr=%0d",
               what, din8, kin, rd, cntl6, cntl4, kvalid, kerr);
    end
  endtask

  initial begin
    for (int k = 0; k < 2; k++)
      for (int rr = 0; rr < 2; rr++)
        for (int b = 0; b < 256; b++) begin
          din8 = 8'(b); kin = 1'(k); rd = rd_t'(rr);
          @(posedge clk);
          r = encode(din8, kin, 1'(rr));
          check(kvalid == r.kvalid, "kvalid");
          check(kerr == r.kerr, "kerr");
          if (r.kvalid) begin
            check({cntl6, cntl4} == r.code, "special code");
            accepted[rr]++;
          end else
            check({cntl6, cntl4} == '0, "code not zero");
        end
    check(accepted[0] == 12 && accepted[1] == 12, "twelve special characters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
