// rca: ripple-carry adder of WIDTH bits (4 by default).
//
// In the fault-tolerant adder the sparse Kogge-Stone tree delivers only the
// carry into each 4-bit segment; one such adder per segment (RC0..RC3) forms
// the sum bits of its segment from that carry, and two more identical
// instances (the test RCs) recompute whichever segment is under test. The
// adder is a chain of full_adder cells, the carry rippling from bit 0 up.
// Combinational. The segment width of 4 follows from the four RCAs of a
// 16-bit sum; building it as a full-adder chain is this design's choice.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
