// ft_sparse_ksa: fault-tolerant 16-bit sparse Kogge-Stone adder.
//
// Main idea: the sum bits are formed by four small ripple-carry adders
// (RC0..RC3, one per 4-bit segment) fed by a sparse Kogge-Stone tree that
// supplies only the segment carries. Because the segments are identical,
// two spare "test" RCAs can check them one at a time. Each cycle the test
// counter picks segment k = test_sel:
//   - the operand multiplexer sends a/b of segment k, and the carry
//     multiplexer its carry-in, to both test RCs;
//   - the sum multiplexer sends RCk's sum to the comparator;
//   - the comparator (majority_voter) votes bitwise 2-of-3 between RCk and
//     the two test RCs, so one wrong copy is outvoted, and flags fault when
//     RCk is the one that disagrees.
// Two ways to use the vote, both described for this adder:
//   - sum (combinational): the four RCA sums with segment k replaced by the
//     voted value. With the mode input stop_on_fault = 1 the counter holds
//     while fault is high, so once a faulty RCA is found it stays under test and sum is
//     corrected every cycle; this covers one faulty RCA.
//   - corrected_sum (registered; used with stop_on_fault = 0): every
//     cycle the voted segment is written into segment k of the 16-bit
//     register and the counter moves on, so after 4 cycles with the same
//     operands all four segments have been voted and the register is correct
//     even if several RCAs are faulty (one fault per vote).
// Timing: sum and cout follow a, b, cin combinationally. test_sel advances
// on each rising edge (unless held). corrected_sum segment k is loaded on the
// edge that ends the cycle with test_sel == k; hold the operands 4 cycles and
// sample corrected_sum after the 4th edge. rst_n is active-low asynchronous.
// Synthesis: the two test RCs are the same logic on the same inputs, and a
// synthesizer that merges equal logic folds them into one (test_mismatch
// then becomes constant 0 and the vote loses a copy). Protect the g_test_rc
// instances with the tool's keep / dont-touch constraint.
// The blocks and their connections follow the document's block diagram; the
// replaced-segment form of sum, the clock enable in place of a stopped clock,
// the stop_on_fault mode input and the flag outputs are this design's choices.
module ft_sparse_ksa #(
  parameter int unsigned WIDTH         = 16,
  parameter int unsigned SEG           = 4,
  localparam int unsigned NSEG         = WIDTH / SEG,
  localparam int unsigned SW           = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             stop_on_fault,  // 1: hold the counter on a fault
  output logic [WIDTH-1:0] sum,            // RCA sums, segment under test voted
  output logic             cout,
  output logic [WIDTH-1:0] corrected_sum,  // register: every segment voted
  output logic [SW-1:0]    test_sel,       // segment (RCA) under test
  output logic             fault,          // RCA under test outvoted
  output logic             test_mismatch   // the two test RCs disagree
);

  logic [WIDTH-1:0]             g, p;
  logic [NSEG:0]                c_seg;
  logic [NSEG-1:0][SEG-1:0]     a_seg, b_seg, rc_sum, sum_seg;
  logic [NSEG-1:0][2*SEG-1:0]   ab_seg;
  logic [NSEG-1:0]              rc_cout;  // segment carry-outs: the tree supplies
                                          // the carries, so these stay unused
  logic [2*SEG-1:0]             ab_t;
  logic                         cin_t;
  logic [1:0][SEG-1:0]          t_sum;
  logic [1:0]                   t_cout;   // unused, as rc_cout
  logic [SEG-1:0]               dut_sum, voted;
  logic [NSEG-1:0][SEG-1:0]     reg_q;

  assign a_seg = a;
  assign b_seg = b;

  // generate and propagate, sparse carry tree
  gp_gen #(.WIDTH(WIDTH)) u_gp (.a(a), .b(b), .g(g), .p(p));

  sparse_ks_tree #(.WIDTH(WIDTH), .SEG(SEG)) u_tree (
    .g(g), .p(p), .cin(cin), .c(c_seg)
  );

  assign cout = c_seg[NSEG];

  // RC0 .. RC(NSEG-1)
  for (genvar k = 0; k < NSEG; k++) begin : g_rc
    rca #(.WIDTH(SEG)) u_rc (
      .a(a_seg[k]), .b(b_seg[k]), .cin(c_seg[k]),
      .sum(rc_sum[k]), .cout(rc_cout[k])
    );
    assign ab_seg[k] = {a_seg[k], b_seg[k]};
  end

  // test counter and the multiplexers it steers
  test_counter #(.N(NSEG)) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(!(stop_on_fault && fault)), .count(test_sel)
  );

  seg_mux #(.WIDTH(2*SEG), .N(NSEG)) u_op_mux (
    .in(ab_seg), .sel(test_sel), .out(ab_t)
  );

  seg_mux #(.WIDTH(1), .N(NSEG)) u_carry_mux (
    .in(c_seg[NSEG-1:0]), .sel(test_sel), .out(cin_t)
  );

  seg_mux #(.WIDTH(SEG), .N(NSEG)) u_sum_mux (
    .in(rc_sum), .sel(test_sel), .out(dut_sum)
  );

  // the two test RCs
  for (genvar t = 0; t < 2; t++) begin : g_test_rc
    rca #(.WIDTH(SEG)) u_trc (
      .a(ab_t[2*SEG-1:SEG]), .b(ab_t[SEG-1:0]), .cin(cin_t),
      .sum(t_sum[t]), .cout(t_cout[t])
    );
  end

  // comparator
  majority_voter #(.WIDTH(SEG)) u_cmp (
    .dut(dut_sum), .t0(t_sum[0]), .t1(t_sum[1]),
    .voted(voted), .fault(fault), .test_mismatch(test_mismatch)
  );

  // combinational sum: segment under test replaced by the vote
  always_comb begin
    sum_seg = rc_sum;
    sum_seg[test_sel] = voted;
  end
  assign sum = sum_seg;

  // corrected-sum register
  corrected_sum_reg #(.WIDTH(WIDTH), .SEG(SEG)) u_reg (
    .clk(clk), .rst_n(rst_n), .we(1'b1), .sel(test_sel), .d(voted), .q(reg_q)
  );
  assign corrected_sum = reg_q;

endmodule
