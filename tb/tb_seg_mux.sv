// tb_seg_mux: test of the 4:1 segment selector (4-bit words).
// Random input words; for each select value the output must equal the word
// the testbench indexes itself.
module tb_seg_mux;
  localparam int W = 4, N = 4;
  logic [N-1:0][W-1:0] in;
  logic [1:0] sel;
  logic [W-1:0] out;
  int checks = 0, failures = 0;

  seg_mux #(.WIDTH(W), .N(N)) dut (.in(in), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      in = (W*N)'($urandom);
      for (int s = 0; s < N; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (out !== in[s]) begin
          failures++;
          $display("FAIL in=%h sel=%0d out=%h", in, s, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
