// test_counter: the bit counter that picks the RCA under test.
//
// A modulo-N up counter (N = 4, so 2 bits, counting 0,1,2,3,0,...). Its value
// steers the operand, carry and sum multiplexers and the write of the
// corrected-sum register. It advances on every rising clock edge while en is
// high. The document stops the counter's clock when a fault is found; here
// that is a synchronous enable instead of a gated clock, which is this
// design's choice. rst_n is an active-low asynchronous reset to 0.
module test_counter #(
  parameter int unsigned N    = 4,
  localparam int unsigned SW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [SW-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   count <= '0;
    else if (en) begin
      if (count == SW'(N - 1))    count <= '0;
      else                        count <= count + 1'b1;
    end
  end

endmodule
