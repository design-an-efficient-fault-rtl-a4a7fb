// tb_gp_gen: self-checking test of gp_gen at its default 16 bits.
// Random and corner operands; g and p are compared with a&b and a^b
// computed bit by bit in the testbench.
module tb_gp_gen;
  localparam int W = 16;
  logic [W-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  gp_gen dut (.a(a), .b(b), .g(g), .p(p));

  task automatic check();
    logic [W-1:0] eg, ep;
    for (int i = 0; i < W; i++) begin
      eg[i] = (a[i] == 1'b1) && (b[i] == 1'b1);
      ep[i] = (a[i] != b[i]);
    end
    checks++;
    if (g !== eg || p !== ep) begin
      failures++;
      $display("FAIL a=%h b=%h g=%h/%h p=%h/%h", a, b, g, eg, p, ep);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; #1 check();
    a = '1; b = '1; #1 check();
    a = '1; b = '0; #1 check();
    for (int n = 0; n < 500; n++) begin
      a = W'($urandom); b = W'($urandom); #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
