// majority_voter: the comparator of the fault-tolerant adder.
//
// Takes three versions of the same segment sum: dut (from the RCA under
// test, through the sum multiplexer) and t0, t1 (from the two test RCs).
// voted is the bitwise 2-of-3 majority, so one wrong copy is outvoted and
// the correct segment sum leaves the comparator even if the RCA under test
// is faulty. fault is high when the RCA under test disagrees with the vote;
// test_mismatch is high when the two test RCs disagree with each other
// (then one of them is the wrong copy). Combinational.
// That the comparator outputs the correct sum follows the description of the
// design; doing it by bitwise majority and the two flags are this design's
// choice.
module majority_voter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] dut,
  input  logic [WIDTH-1:0] t0,
  input  logic [WIDTH-1:0] t1,
  output logic [WIDTH-1:0] voted,
  output logic             fault,
  output logic             test_mismatch
);

  always_comb begin
    voted         = (dut & t0) | (dut & t1) | (t0 & t1);
    fault         = (dut != voted);
    test_mismatch = (t0 != t1);
  end

endmodule
