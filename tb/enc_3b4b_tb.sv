// enc_3b4b_tb: exhaustive check of the 3b/4b table.
//
// Applies every three-bit value with every five-bit value (which decides the
// alternate x.A7 form), both running disparities and the table enabled and
// disabled, and compares with the reference model in enc_ref_pkg. It also
// checks the balance and sign of each code and counts that the alternate
// form was produced for both disparities. One vector per clock.
module enc_3b4b_tb;
  import enc8b10b_pkg::*;
  import enc_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] din3;
  logic [4:0] din5;
  rd_t        rd;
  logic       en;
  code4_t     code4;
  int checks = 0, failures = 0;
  int a7_neg = 0, a7_pos = 0;

  enc_3b4b dut (.din3(din3), .din5(din5), .rd(rd), .en(en), .code4(code4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: y=%0d x=%0d rd=%0d en=%0d code4=%b", what, din3, din5, rd, en, code4);
    end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int r = 0; r < 2; r++)
        for (int x = 0; x < 32; x++)
          for (int y = 0; y < 8; y++) begin
            din3 = 3'(y); din5 = 5'(x); rd = rd_t'(r); en = 1'(e);
            @(posedge clk);
            if (!en) check(code4 == '0, "disabled output not zero");
            else begin
              check(code4 == ref4(din3, din5, 1'b0, 1'b0, 1'(r)), "code");
              check($countones(code4) inside {1, 2, 3}, "balance");
              check((r != 0) ? $countones(code4) <= 2 : $countones(code4) >= 2, "sign");
              if (code4 == 4'b0111) a7_neg++;
              if (code4 == 4'b1000) a7_pos++;
            end
          end
    check(a7_neg == 3 && a7_pos == 3, "x.A7 used for three values at each disparity");
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
