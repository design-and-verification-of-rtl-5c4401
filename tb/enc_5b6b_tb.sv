// enc_5b6b_tb: exhaustive check of the 5b/6b table.
//
// Applies every five-bit value with both running disparities and with the
// table enabled and disabled, and compares the six-bit output with the
// reference model in enc_ref_pkg. It also checks the code rules directly:
// the sub-block holds two to four ones, never more ones than zeros when
// chosen at positive disparity nor fewer at negative disparity, and the
// output is zero while disabled. One vector per clock.
module enc_5b6b_tb;
  import enc8b10b_pkg::*;
  import enc_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] din5;
  rd_t        rd;
  logic       en;
  code6_t     code6;
  int checks = 0, failures = 0;

  enc_5b6b dut (.din5(din5), .rd(rd), .en(en), .code6(code6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0d rd=%0d en=%0d code6=%b", what, din5, rd, en, code6);
    end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int r = 0; r < 2; r++)
        for (int x = 0; x < 32; x++) begin
          din5 = 5'(x); rd = rd_t'(r); en = 1'(e);
          @(posedge clk);
          if (!en) check(code6 == '0, "disabled output not zero");
          else begin
            check(code6 == ref6(din5, 1'b0, 1'(r)), "code");
            check($countones(code6) inside {2, 3, 4}, "balance");
            check((r != 0) ? $countones(code6) <= 3 : $countones(code6) >= 3, "sign");
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
