// corrected_sum_reg: the 16-bit register that holds the corrected sum.
//
// The register is split into NSEG segments of SEG bits. On each rising clock
// edge with we high, segment sel is loaded with d (the voted segment sum
// from the comparator); the other segments keep their value. As the test
// counter walks 0..NSEG-1, every segment is rewritten with a voted value,
// so after NSEG cycles on the same operands q holds a sum in which every
// faulty RCA, not only one, has been outvoted. Reset (active-low,
// asynchronous) clears it. Width and per-count loading follow the
// document; the write enable and reset are this design's choice.
module corrected_sum_reg #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned SEG   = 4,
  localparam int unsigned NSEG = WIDTH / SEG,
  localparam int unsigned SW   = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [SW-1:0]              sel,
  input  logic [SEG-1:0]             d,
  output logic [NSEG-1:0][SEG-1:0]   q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (we) q[sel] <= d;
  end

endmodule
