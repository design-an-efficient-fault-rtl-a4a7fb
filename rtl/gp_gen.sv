// gp_gen: bitwise generate and propagate ("generate and penetrate") stage.
//
// First stage of every Kogge-Stone adder in this design. For each bit i
//   g[i] = a[i] & b[i]   (the bit creates a carry)
//   p[i] = a[i] ^ b[i]   (the bit passes a carry on; also the half sum)
// The XOR form of propagate is used because the sum stage reuses it as the
// half sum. Purely combinational, no clock. The block is named in the
// fault-tolerant adder's block diagram; its equations are the standard ones.
module gp_gen #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] p
);

  always_comb begin
    g = a & b;
    p = a ^ b;
  end

endmodule
