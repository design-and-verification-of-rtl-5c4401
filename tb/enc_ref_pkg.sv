// enc_ref_pkg: reference model of the 8b/10b code for the testbenches.
//
// Written independently of the RTL tables: it stores only the form of each
// sub-block used at negative running disparity (as hex numbers) and derives
// the positive-disparity form by rule. A sub-block is inverted at positive
// disparity when it is unbalanced, and also for the balanced sub-blocks that
// have two forms (D.7 in 5b/6b; x.3 and the K.28 neutral codes in 3b/4b).
// The running disparity is recomputed from the number of ones in each
// produced sub-block, not from a list of values.
package enc_ref_pkg;

  // abcdei at negative running disparity, index x = EDCBA
  localparam logic [5:0] T6 [32] = '{
    6'h27, 6'h1D, 6'h2D, 6'h31, 6'h35, 6'h29, 6'h19, 6'h38,
    6'h39, 6'h25, 6'h15, 6'h34, 6'h0D, 6'h2C, 6'h1C, 6'h17,
    6'h1B, 6'h23, 6'h13, 6'h32, 6'h0B, 6'h2A, 6'h1A, 6'h3A,
    6'h33, 6'h26, 6'h16, 6'h36, 6'h0E, 6'h2E, 6'h1E, 6'h2B};
  localparam logic [5:0] K28_6B = 6'b001111;

  // fghj at negative running disparity, index y = HGF (7 = primary form)
  localparam logic [3:0] T4 [8] = '{
    4'hB, 4'h9, 4'h5, 4'hC, 4'hD, 4'hA, 4'h6, 4'hE};
  localparam logic [3:0] A7_4B = 4'b0111;

  function automatic bit is_special(input logic [7:0] b);
    return (b[4:0] == 5'd28) ||
           (b[7:5] == 3'd7 && b[4:0] inside {5'd23, 5'd27, 5'd29, 5'd30});
  endfunction

  // rd: 0 = negative, 1 = positive
  function automatic logic [5:0] ref6(input logic [4:0] x, input bit k28, input bit rd);
    logic [5:0] c;
    c = k28 ? K28_6B : T6[x];
    if (rd && ($countones(c) != 3 || (!k28 && x == 5'd7))) c = ~c;
    return c;
  endfunction

  function automatic logic [3:0] ref4(input logic [2:0] y, input logic [4:0] x,
                                      input bit k, input bit k28, input bit rd);
    logic [3:0] c;
    bit two_forms;
    if (y == 3'd7 && (k || (!rd && x inside {5'd17, 5'd18, 5'd20})
                        || ( rd && x inside {5'd11, 5'd13, 5'd14})))
      c = A7_4B;
    else if (k28 && y inside {3'd1, 3'd2, 3'd5, 3'd6})
      c = ~T4[y];
    else
      c = T4[y];
    two_forms = (y == 3'd3) || (k28 && y inside {3'd1, 3'd2, 3'd5, 3'd6});
    if (rd && ($countones(c) != 2 || two_forms)) c = ~c;
    return c;
  endfunction

  typedef struct packed {
    logic [9:0] code;    // abcdei fghj
    logic       rd_mid;
    logic       rd_out;
    logic       kvalid;
    logic       kerr;
  } ref_t;

  function automatic ref_t encode(input logic [7:0] b, input bit kin, input bit rd);
    ref_t r;
    logic [5:0] c6;
    logic [3:0] c4;
    bit k, k28;
    k   = kin && is_special(b);
    k28 = k && b[4:0] == 5'd28;
    c6  = ref6(b[4:0], k28, rd);
    r.rd_mid = ($countones(c6) == 3) ? rd : ~rd;
    c4  = ref4(b[7:5], b[4:0], k, k28, r.rd_mid);
    r.rd_out = ($countones(c4) == 2) ? r.rd_mid : ~r.rd_mid;
    r.code   = {c6, c4};
    r.kvalid = k;
    r.kerr   = kin && !k;
    return r;
  endfunction

endpackage
