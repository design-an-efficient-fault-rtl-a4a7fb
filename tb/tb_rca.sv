// tb_rca: exhaustive test of the 4-bit ripple-carry adder.
// Every a, b and cin is applied; {cout, sum} is compared with a + b + cin.
module tb_rca;
  localparam int W = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << W); x++)
      for (int y = 0; y < (1 << W); y++)
        for (int c = 0; c < 2; c++) begin
          a = W'(x); b = W'(y); cin = c[0];
          #1;
          checks++;
          if ({cout, sum} !== (W+1)'(x + y + c)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> %b %h", x, y, c, cout, sum);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
