// disparity_gen_tb: exhaustive check of running-disparity generation.
//
// Applies every byte as a data character and every special character with
// kvalid set, at both running disparities, and compares rd_mid and rd_out
// with the disparities the reference model derives by counting the ones of
// the sub-blocks it produces. Counts both flips and holds. One vector per
// clock.
module disparity_gen_tb;
  import enc8b10b_pkg::*;
  import enc_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] din8;
  logic       kvalid;
  rd_t        rd_in, rd_mid, rd_out;
  int checks = 0, failures = 0;
  int flips = 0, holds = 0;
  ref_t r;

  disparity_gen dut (.din8(din8), .kvalid(kvalid), .rd_in(rd_in),
                     .rd_mid(rd_mid), .rd_out(rd_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: byte=%h kvalid=%0d rd_in=%0d rd_mid=%0d rd_out=%0d",
               what, din8, kvalid, rd_in, rd_mid, rd_out);
    end
  endtask

  initial begin
    for (int k = 0; k < 2; k++)
      for (int rr = 0; rr < 2; rr++)
        for (int b = 0; b < 256; b++) begin
          if (k == 1 && !is_special(8'(b))) continue;
          din8 = 8'(b); kvalid = 1'(k); rd_in = rd_t'(rr);
          @(posedge clk);
          r = encode(din8, kvalid, 1'(rr));
          check(rd_mid == rd_t'(r.rd_mid), "rd_mid");
          check(rd_out == rd_t'(r.rd_out), "rd_out");
          if (rd_out != rd_in) flips++; else holds++;
        end
    check(flips > 0 && holds > 0, "both flips and holds seen");
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
