// enc8b10b_tb: end-to-end test of the pipelined 8b/10b encoder.
//
// Organised as a small verification environment: a generator makes the
// stimulus (directed sweeps, then random bytes with kin set now and then),
// a driver applies one byte per clock on the falling edge, an input monitor
// samples what the encoder registers on each rising edge and feeds a
// cycle-accurate reference (the encoder's pipeline around enc_ref_pkg), and
// an output monitor compares out10b, kerr and Rdout on the next falling edge.
// Coverage counters record data bytes, special characters and running
// disparities seen, and how often each mechanism of the encoder was used.
//
// Phases:
//   1. reset; outputs must be zero and Rdout negative
//   2. RdIn held at 0 and then at 1 by the testbench (not looped back):
//      every data byte, every special character, and bytes sent with kin = 1
//      that are not special characters (kerr)
//   3. reset, then Rdout looped back to RdIn: every data byte, every special
//      character, a latency probe, and random traffic. The serial stream is
//      checked for runs of at most five equal bits and a digital sum
//      variation of at most six.
//   4. reset in the middle of looped-back traffic, then more random traffic.
// Latency: a byte driven before rising edge n must be on out10b after edge
// n+1; the probe measures this in clock edges.
module enc8b10b_tb;
  import enc_ref_pkg::*;

  localparam int N_RANDOM = 4000;
  localparam int WATCHDOG = 20000;

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

  // Rd source: looped back from Rdout or forced by the testbench
  logic loop_rd = 1'b0;
  logic rd_force = 1'b0;
  assign RdIn = loop_rd ? Rdout : rd_force;

  enc8b10b dut (
    .clk(clk), .rst(rst), .In8b(In8b), .kin(kin), .RdIn(RdIn),
    .out10b(out10b), .kerr(kerr), .Rdout(Rdout)
  );

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at cycle %0d: out10b=%b kerr=%0d Rdout=%0d",
                 what, cycle, out10b, kerr, Rdout);
    end
  endtask

  // ------------------------------------------------------------------
  // Input monitor and reference pipeline
  // ------------------------------------------------------------------
  logic [7:0] mq_byte;
  logic       mq_k;
  logic [9:0] exp_code;
  logic       exp_kerr, exp_rd;
  bit         exp_valid = 1'b0;   // expected values are known
  bit         exp_a7, exp_flip, exp_special;
  ref_t       r;

  always @(posedge clk) begin
    cycle++;
    if (rst) begin
      exp_code = '0; exp_kerr = 1'b0; exp_rd = 1'b0;
      mq_byte = '0; mq_k = 1'b0;
      exp_a7 = 1'b0; exp_flip = 1'b0; exp_special = 1'b0;
      exp_valid = 1'b1;
    end else begin
      r = encode(mq_byte, mq_k, RdIn);
      exp_code    = r.code;
      exp_kerr    = r.kerr;
      exp_rd      = r.rd_out;
      exp_special = r.kvalid;
      exp_a7      = !r.kvalid && mq_byte[7:5] == 3'd7 &&
                    (r.code[3:0] == 4'b0111 || r.code[3:0] == 4'b1000);
      exp_flip    = r.rd_out != RdIn;
      mq_byte = In8b;
      mq_k    = kin;
    end
  end

  // ------------------------------------------------------------------
  // Coverage and mechanism counters
  // ------------------------------------------------------------------
  int cov_data_rd [256][2];   // data byte x running disparity (input side)
  int cov_k_rd [256][2];      // special character x running disparity
  int n_kerr = 0, n_special = 0, n_a7 = 0, n_flip = 0, n_hold = 0;
  int n_reset = 0, n_loop_syms = 0;

  // ------------------------------------------------------------------
  // Serial stream checks (looped-back phases only)
  // ------------------------------------------------------------------
  bit stream_on = 1'b0;
  bit last_bit;
  int run_len, run_max;
  int rsum, rsum_min, rsum_max;

  task automatic stream_start();
    stream_on = 1'b1;
    run_len = 0; run_max = 0;
    rsum = -1; rsum_min = -1; rsum_max = -1;   // starts at negative disparity
  endtask

  task automatic stream_push(input logic [9:0] c);
    for (int i = 9; i >= 0; i--) begin
      if (run_len > 0 && c[i] == last_bit) run_len++;
      else run_len = 1;
      last_bit = c[i];
      if (run_len > run_max) run_max = run_len;
      rsum += c[i] ? 1 : -1;
      if (rsum < rsum_min) rsum_min = rsum;
      if (rsum > rsum_max) rsum_max = rsum;
    end
  endtask

  // ------------------------------------------------------------------
  // Output monitor + driver, one call per clock
  // ------------------------------------------------------------------
  task automatic step(input logic [7:0] b, input logic k, input logic do_rst = 1'b0);
    @(negedge clk);
    if (exp_valid) begin
      check(out10b == exp_code, "out10b");
      check(kerr == exp_kerr, "kerr");
      check(Rdout == exp_rd, "Rdout");
      if (!rst) begin
        if (exp_kerr) n_kerr++;
        if (exp_special) n_special++;
        if (exp_a7) n_a7++;
        if (exp_flip) n_flip++; else n_hold++;
        if (stream_on) begin
          stream_push(out10b);
          n_loop_syms++;
        end
      end
    end
    // drive the next transaction
    if (do_rst) n_reset++;
    rst  = do_rst;
    In8b = b;
    kin  = k;
  endtask

  // Coverage on the input side: which byte meets which disparity. The
  // disparity a byte is encoded with is the one present one clock after it
  // was driven; it is recorded by the input monitor below.
  logic [7:0] cov_byte;
  logic       cov_k;
  always @(posedge clk) begin
    if (!rst) begin
      if (cov_k && is_special(cov_byte)) cov_k_rd[cov_byte][RdIn]++;
      else if (!cov_k) cov_data_rd[cov_byte][RdIn]++;
    end
    cov_byte = rst ? 8'h00 : In8b;
    cov_k    = rst ? 1'b0 : kin;
  end

  // ------------------------------------------------------------------
  // Generator
  // ------------------------------------------------------------------
  logic [7:0] specials [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  function automatic logic [7:0] random_byte();
    return 8'($urandom_range(0, 255));
  endfunction

  int probe_drive, probe_seen;
  logic [9:0] k285_neg = 10'b001111_1010, k285_pos = 10'b110000_0101;

  initial begin
    automatic int cov_hit, cov_total;
    rst = 1'b1; In8b = '0; kin = 1'b0;

    // 1. reset
    repeat (3) step(8'h00, 1'b0, 1'b1);
    check(out10b == '0 && kerr == 1'b0 && Rdout == 1'b0, "reset values");

    // 2. RdIn forced, first 0 then 1
    for (int f = 0; f < 2; f++) begin
      rd_force = 1'(f);
      for (int b = 0; b < 256; b++) step(8'(b), 1'b0);
      foreach (specials[i]) step(specials[i], 1'b1);
      step(8'hFF, 1'b1);          // not a special character
      step(8'h00, 1'b1);
      step(8'hF1, 1'b1);
      step(8'h55, 1'b0);
    end

    // 3. looped back from a reset
    step(8'h00, 1'b0, 1'b1);
    step(8'h00, 1'b0, 1'b1);
    loop_rd = 1'b1;
    step(8'h00, 1'b0);            // first edge out of reset: encodes the reset byte
    stream_start();
    for (int b = 0; b < 256; b++) step(8'(b), 1'b0);
    foreach (specials[i]) step(specials[i], 1'b1);
    for (int b = 255; b >= 0; b--) step(8'(b), 1'b0);
    foreach (specials[i]) begin step(specials[i], 1'b1); step(8'h4A, 1'b0); end

    // latency probe: K28.5 among D.0 bytes
    repeat (4) step(8'h00, 1'b0);
    probe_seen  = -1;
    step(8'hBC, 1'b1);
    probe_drive = cycle;          // K28.5 is now on In8b
    for (int i = 0; i < 4; i++) begin
      step(8'h00, 1'b0);
      if (probe_seen < 0 && (out10b == k285_neg || out10b == k285_pos))
        probe_seen = cycle;
    end
    // one edge captures the byte, the next registers its code
    check(probe_seen - probe_drive == 2, "latency: code two clock edges after the byte");

    // random traffic
    for (int n = 0; n < N_RANDOM; n++) begin
      automatic int p = $urandom_range(0, 99);
      if (p < 8)       step(specials[$urandom_range(0, 11)], 1'b1);
      else if (p < 10) step(random_byte(), 1'b1);
      else             step(random_byte(), 1'b0);
    end
    step(8'h00, 1'b0);
    check(run_max <= 5, "run length at most five");
    check(rsum_max - rsum_min <= 6, "digital sum variation at most six");
    $display("stream: %0d symbols, longest run %0d, digital sum %0d..%0d",
             n_loop_syms, run_max, rsum_min, rsum_max);

    // 4. reset in the middle of traffic, then go on
    stream_on = 1'b0;
    step(8'hBC, 1'b1, 1'b1);
    step(8'h00, 1'b0);
    stream_start();
    for (int n = 0; n < N_RANDOM / 4; n++) step(random_byte(), 1'b0);
    step(8'h00, 1'b0);
    check(run_max <= 5, "run length at most five after reset");
    check(rsum_max - rsum_min <= 6, "digital sum variation at most six after reset");

    // coverage report
    cov_hit = 0; cov_total = 0;
    for (int b = 0; b < 256; b++)
      for (int d = 0; d < 2; d++) begin
        cov_total++;
        if (cov_data_rd[b][d] > 0) cov_hit++;
      end
    $display("coverage data byte x RdIn: %0d/%0d", cov_hit, cov_total);
    check(cov_hit == cov_total, "coverage data byte x RdIn");
    cov_hit = 0; cov_total = 0;
    foreach (specials[i])
      for (int d = 0; d < 2; d++) begin
        cov_total++;
        if (cov_k_rd[specials[i]][d] > 0) cov_hit++;
      end
    $display("coverage special x RdIn: %0d/%0d", cov_hit, cov_total);
    check(cov_hit == cov_total, "coverage special x RdIn");

    $display("mechanisms: special=%0d kerr=%0d A7=%0d rd_flip=%0d rd_hold=%0d reset=%0d latency=%0d",
             n_special, n_kerr, n_a7, n_flip, n_hold, n_reset, probe_seen - probe_drive);
    check(n_special > 0, "special characters sent");
    check(n_kerr > 0, "kerr raised");
    check(n_a7 > 0, "alternate x.A7 used");
    check(n_flip > 0, "running disparity flipped");
    check(n_hold > 0, "running disparity held");
    check(n_reset > 0, "reset applied");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
