// tb_test_counter: test of the 2-bit test counter.
// After reset the count must be 0; with a random enable it must step
// 0,1,2,3,0,... on enabled edges and hold otherwise, checked every cycle
// against a model in the testbench.
module tb_test_counter;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [1:0] count;
  int model = 0;
  int checks = 0, failures = 0;

  test_counter #(.N(4)) dut (.clk(clk), .rst_n(rst_n), .en(en), .count(count));

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
    if (count !== 2'd0) begin failures++; $display("FAIL reset count=%0d", count); end
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) model = (model + 1) % 4;
      #1;
      checks++;
      if (count !== 2'(model)) begin
        failures++;
        $display("FAIL cycle %0d count=%0d model=%0d", n, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
