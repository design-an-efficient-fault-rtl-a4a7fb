// sparse_ks_tree: sparse Kogge-Stone carry tree.
//
// Instead of a carry for every bit, the tree delivers only the carry into
// every SEG-bit segment (bits 4, 8, 12 and the carry-out for 16 bits); the
// ripple-carry adders of the segments form the sum bits from there. The
// incoming carry is folded into bit 0 (g0' = g0 | p0 & cin), so every group
// term below is a true carry. Levels 0 .. log2(SEG)-1 reduce each segment
// to one (G,P) pair at its top bit (span 1 at odd bits, span 2 at bits
// 3, 7, 11, 15, ...); the remaining levels are a Kogge-Stone tree over the
// segment tops, with spans SEG, 2*SEG, ... . Positions a level does not
// compute pass their pair unchanged. Combinational.
// Interface: c[k] is the carry into segment k, c[0] = cin, c[NSEG] is the
// carry-out. The tree's name and its role come from the document; the node
// placement is the usual sparse Kogge-Stone arrangement and this design's
// reading of it.
module sparse_ks_tree
  import ksa_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned SEG   = 4,
  localparam int unsigned NSEG = WIDTH / SEG,
  localparam int unsigned LVL  = $clog2(WIDTH),
  localparam int unsigned SLVL = $clog2(SEG)
) (
  input  logic [WIDTH-1:0] g,
  input  logic [WIDTH-1:0] p,
  input  logic             cin,
  output logic [NSEG:0]    c
);

  gp_t [WIDTH-1:0] top;  // after the last level: group (G,P) of bits i..0

  always_comb begin
    gp_t [WIDTH-1:0] cur, nxt;
    for (int unsigned i = 0; i < WIDTH; i++) cur[i] = '{g: g[i], p: p[i]};
    cur[0].g = g[0] | (p[0] & cin);
    for (int unsigned l = 0; l < LVL; l++) begin
      nxt = cur;
      for (int unsigned i = 0; i < WIDTH; i++) begin
        // inside a segment: up-sweep to the segment's top bit
        // across segments: Kogge-Stone over the segment tops
        if (l < SLVL) begin
          if (((i + 1) % (2 << l)) == 0) nxt[i] = gp_combine(cur[i], cur[i - (1 << l)]);
        end else begin
          if ((i % SEG) == SEG - 1 && i >= (1 << l)) nxt[i] = gp_combine(cur[i], cur[i - (1 << l)]);
        end
      end
      cur = nxt;
    end
    top = cur;
  end

  assign c[0] = cin;
  for (genvar k = 0; k < NSEG; k++) begin : g_c
    assign c[k+1] = top[k*SEG + SEG - 1].g;
  end

endmodule
