// tb_majority_voter: test of the comparator (bitwise 2-of-3 vote).
// A random correct word is given to all three inputs, then one input at a
// time is corrupted with a random non-zero mask. The vote must return the
// correct word each time; fault must be high exactly when the first input
// (the RCA under test) was the corrupted one and differs; test_mismatch
// exactly when the two test inputs differ.
module tb_majority_voter;
  localparam int W = 4;
  logic [W-1:0] dut_i, t0, t1, voted;
  logic fault, test_mismatch;
  int checks = 0, failures = 0;

  majority_voter #(.WIDTH(W)) dut (
    .dut(dut_i), .t0(t0), .t1(t1),
    .voted(voted), .fault(fault), .test_mismatch(test_mismatch)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] good, mask;
    for (int n = 0; n < 300; n++) begin
      good = W'($urandom);
      mask = W'($urandom_range(1, (1 << W) - 1));
      for (int which = -1; which < 3; which++) begin
        dut_i = (which == 0) ? good ^ mask : good;
        t0    = (which == 1) ? good ^ mask : good;
        t1    = (which == 2) ? good ^ mask : good;
        #1;
        checks++;
        if (voted !== good || fault !== (which == 0) ||
            test_mismatch !== (which == 1 || which == 2)) begin
          failures++;
          $display("FAIL good=%h mask=%h which=%0d voted=%h f=%b tm=%b",
                   good, mask, which, voted, fault, test_mismatch);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
