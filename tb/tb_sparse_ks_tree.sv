// tb_sparse_ks_tree: test of the 16-bit sparse Kogge-Stone carry tree.
// g and p are formed in the testbench from random operands; each segment
// carry c[k] must equal bit 4k of the integer sum of the low 4k bits of a
// and b plus cin, and c[4] the carry-out of the whole 16-bit sum.
module tb_sparse_ks_tree;
  localparam int W = 16, SEG = 4, NSEG = W / SEG;
  logic [W-1:0] a, b, g, p;
  logic cin;
  logic [NSEG:0] c;
  int checks = 0, failures = 0;

  assign g = a & b;
  assign p = a ^ b;

  sparse_ks_tree dut (.g(g), .p(p), .cin(cin), .c(c));

  task automatic check();
    logic [NSEG:0] e;
    logic [W:0] part;
    for (int k = 0; k <= NSEG; k++) begin
      part = (W+1)'(a & ((17'(1) << (k*SEG)) - 1)) + (W+1)'(b & ((17'(1) << (k*SEG)) - 1)) + (W+1)'(cin);
      e[k] = (k == 0) ? cin : part[k*SEG];
    end
    checks++;
    if (c !== e) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b c=%b exp=%b", a, b, cin, c, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hffff; b = 16'h0000; cin = 1'b1; #1 check();
    a = 16'hffff; b = 16'h0000; cin = 1'b0; #1 check();
    a = 16'h8000; b = 16'h8000; cin = 1'b0; #1 check();
    a = 16'h0fff; b = 16'h0001; cin = 1'b0; #1 check();
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      // bias some operands toward long propagate chains
      if (n % 4 == 0) b = ~a ^ W'(1 << $urandom_range(0, W-1));
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
