// tb_corrected_sum_reg: test of the 16-bit corrected-sum register.
// Random segment writes (random select, data and write enable) are applied
// each cycle; the register is compared after every edge with a model that
// replaces only the selected 4-bit segment.
module tb_corrected_sum_reg;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [1:0] sel = '0;
  logic [3:0] d = '0;
  logic [3:0][3:0] q;
  logic [15:0] model = '0;
  int checks = 0, failures = 0;

  corrected_sum_reg dut (.clk(clk), .rst_n(rst_n), .we(we), .sel(sel), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 4) != 0);
      sel = 2'($urandom);
      d   = 4'($urandom);
      @(posedge clk);
      if (we) model[sel*4 +: 4] = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h model=%h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
