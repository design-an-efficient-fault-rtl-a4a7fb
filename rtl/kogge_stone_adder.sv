// kogge_stone_adder: WIDTH-bit Kogge-Stone parallel prefix adder (32 bits).
//
// Three stages, all combinational:
//   1. gp_gen forms bit generate g[i] = a&b and propagate p[i] = a^b; the
//      carry-in c0 is folded into bit 0.
//   2. log2(WIDTH) prefix levels; at level l every bit i >= 2^l merges its
//      (G,P) pair with that of bit i-2^l (the "black dot"), bits below 2^l
//      pass theirs on. After the last level node i holds the group generate
//      of bits i..0, which is the carry into bit i+1. This is the dense tree
//      of the 16-bit prefix graph in the document, drawn there as four rows
//      of dots with spans 1, 2, 4, 8, here grown to one more level for 32.
//   3. sum[i] = p[i] ^ c[i], with c[0] = c0 and c32 = c[WIDTH].
// The 32-bit width, the port names a, b, c0, sum and c32 and the internal
// g, p and c[31:1] follow the document's simulation; the code is this
// design's own.
module kogge_stone_adder
  import ksa_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned LVL  = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  output logic [WIDTH-1:0] sum,
  output logic             c32
);

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;
  gp_t [WIDTH-1:0]  top;  // after the last level: group (G,P) of bits i..0

  gp_gen #(.WIDTH(WIDTH)) u_gp (.a(a), .b(b), .g(g), .p(p));

  always_comb begin
    gp_t [WIDTH-1:0] cur, nxt;
    for (int unsigned i = 0; i < WIDTH; i++) cur[i] = '{g: g[i], p: p[i]};
    cur[0].g = g[0] | (p[0] & c0);
    for (int unsigned l = 0; l < LVL; l++) begin
      nxt = cur;
      for (int unsigned i = (1 << l); i < WIDTH; i++) nxt[i] = gp_combine(cur[i], cur[i - (1 << l)]);
      cur = nxt;
    end
    top = cur;
  end

  assign c[0] = c0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_c
    assign c[i+1] = top[i].g;
  end

  assign sum = p ^ c[WIDTH-1:0];
  assign c32 = c[WIDTH];

endmodule
