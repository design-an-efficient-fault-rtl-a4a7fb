// seg_mux: N-to-1 selector of WIDTH-bit words.
//
// The fault-tolerant adder uses three of these, all steered by the test
// counter: the 4:1 operand multiplexer (routes the A and B segment of the
// RCA under test to the two test RCs), the carry multiplexer (routes that
// segment's carry-in) and the 4:1 sum multiplexer (brings the sum of the RCA
// under test to the comparator). out = in[sel]. Combinational.
module seg_mux #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned N     = 4,
  localparam int unsigned SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] in,
  input  logic [SW-1:0]           sel,
  output logic [WIDTH-1:0]        out
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel == SW'(i)) out = in[i];
    end
  end

endmodule
