// tb_kogge_stone_adder: test of the 32-bit Kogge-Stone adder at its default
// width. Corner cases (the full 32-bit carry chain, overflow, the 3 + 2
// example) and random operands; {c32, sum} is compared with a + b + c0.
// A second, 16-bit instance (the four-level prefix graph) gets the low
// halves of the same operands and is checked the same way.
module tb_kogge_stone_adder;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic c0, c32;
  int checks = 0, failures = 0;

  logic [15:0] sum16;
  logic c16;

  kogge_stone_adder dut (.a(a), .b(b), .c0(c0), .sum(sum), .c32(c32));
  kogge_stone_adder #(.WIDTH(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .c0(c0), .sum(sum16), .c32(c16));

  task automatic check();
    logic [W:0] e;
    e = (W+1)'(a) + (W+1)'(b) + (W+1)'(c0);
    checks++;
    if ({c32, sum} !== e) begin
      failures++;
      $display("FAIL a=%h b=%h c0=%b -> %b %h exp %h", a, b, c0, c32, sum, e);
    end
    e = 33'(a[15:0]) + 33'(b[15:0]) + 33'(c0);
    checks++;
    if ({c16, sum16} !== e[16:0]) begin
      failures++;
      $display("FAIL 16-bit a=%h b=%h c0=%b -> %b %h exp %h", a[15:0], b[15:0], c0, c16, sum16, e[16:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'd3;          b = 32'd2;          c0 = 1'b0; #1 check();
    a = 32'hffff_ffff;  b = 32'h0;          c0 = 1'b1; #1 check();
    a = 32'hffff_ffff;  b = 32'hffff_ffff;  c0 = 1'b1; #1 check();
    a = 32'h8000_0000;  b = 32'h8000_0000;  c0 = 1'b0; #1 check();
    a = 32'h7fff_ffff;  b = 32'h1;          c0 = 1'b0; #1 check();
    a = 32'h0000_ffff;  b = 32'h0;          c0 = 1'b1; #1 check();
    for (int n = 0; n < 3000; n++) begin
      a = $urandom; b = $urandom; c0 = 1'($urandom);
      if (n % 4 == 0) b = ~a ^ (32'(1) << $urandom_range(0, W-1));
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
