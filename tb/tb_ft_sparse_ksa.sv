// tb_ft_sparse_ksa: test of the fault-tolerant sparse Kogge-Stone adder.
//
// Two instances at the default 16 bits: u_reg in register mode
// (stop_on_fault = 0) and u_stop in counter-stop mode (stop_on_fault = 1). Each operand pair
// is held for 4 clock cycles. Checked against a + b + cin computed in the
// testbench:
//   - fault-free: sum and cout every cycle, corrected_sum after 4 cycles,
//     fault and test_mismatch low, test_sel stepping 0,1,2,3;
//   - stuck-at faults forced into sum bits of one or two of RC0..RC3 and of
//     one test RC: corrected_sum of u_reg still right after 4 cycles, fault
//     raised in the cycle its RCA is under test when the stuck bit is wrong;
//   - u_stop: once fault is raised test_sel holds, and sum stays right every
//     cycle for any operands while the faulty RCA is under test.
// Each mechanism (fault seen, faulty raw sum corrected by the register,
// two faulty RCAs corrected together, test RC mismatch, counter held) is
// counted; one that never happens counts as a failure.
module tb_ft_sparse_ksa;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic cin = 1'b0;

  logic [W-1:0] r_sum, r_csum, s_sum, s_csum;
  logic r_cout, r_fault, r_tm, s_cout, s_fault, s_tm;
  logic [1:0] r_sel, s_sel;

  int checks = 0, failures = 0;
  int n_fault_seen = 0, n_raw_corrected = 0, n_multi_corrected = 0;
  int n_tm_seen = 0, n_held = 0;

  ft_sparse_ksa u_reg (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .stop_on_fault(1'b0),
    .sum(r_sum), .cout(r_cout), .corrected_sum(r_csum),
    .test_sel(r_sel), .fault(r_fault), .test_mismatch(r_tm)
  );

  ft_sparse_ksa u_stop (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .stop_on_fault(1'b1),
    .sum(s_sum), .cout(s_cout), .corrected_sum(s_csum),
    .test_sel(s_sel), .fault(s_fault), .test_mismatch(s_tm)
  );

  always #5 clk = ~clk;

  function automatic logic [W:0] ref_sum();
    return (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
  endfunction

  task automatic expect_eq(string what, logic [W:0] got, logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b got=%h exp=%h", what, a, b, cin, got, exp);
    end
  endtask

  // Apply one operand pair for 4 cycles, then check the register.
  // clean: no fault is forced, so every output must be right every cycle.
  task automatic run_op(bit clean, int nfaulty_rca);
    logic [W:0] e;
    logic [1:0] sel0;
    bit raw_wrong = 1'b0;
    @(negedge clk);
    a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
    e = ref_sum();
    for (int cyc = 0; cyc < 4; cyc++) begin
      #1;
      expect_eq("cout", {16'h0, r_cout}, {16'h0, e[W]});
      if (u_reg.rc_sum != e[W-1:0]) raw_wrong = 1'b1;
      if (clean) begin
        expect_eq("sum", {r_cout, r_sum}, e);
        expect_eq("flags", {15'h0, r_fault, r_tm}, '0);
      end
      if (r_fault) n_fault_seen++;
      if (r_tm) n_tm_seen++;
      sel0 = r_sel;
      @(posedge clk);
      #1;
      expect_eq("test_sel step", {15'h0, r_sel}, {15'h0, 2'(sel0 + 2'd1)});
      @(negedge clk);
    end
    expect_eq("corrected_sum", {r_cout, r_csum}, e);
    if (raw_wrong && r_csum == e[W-1:0]) begin
      n_raw_corrected++;
      if (nfaulty_rca > 1) n_multi_corrected++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    expect_eq("reset sel", {15'h0, r_sel}, '0);
    expect_eq("reset csum", {1'b0, r_csum}, '0);

    // fault-free
    for (int n = 0; n < 100; n++) run_op(1'b1, 0);

    // one faulty RCA: RC1, sum bit 2 stuck at 0
    force u_reg.rc_sum[1][2] = 1'b0;
    for (int n = 0; n < 60; n++) run_op(1'b0, 1);

    // two faulty RCAs: RC1 as above and RC3, sum bit 0 stuck at 1
    force u_reg.rc_sum[3][0] = 1'b1;
    for (int n = 0; n < 60; n++) run_op(1'b0, 2);
    release u_reg.rc_sum[1][2];
    release u_reg.rc_sum[3][0];

    // a faulty test RC: test RC 1, sum bit 1 stuck at 0
    force u_reg.t_sum[1][1] = 1'b0;
    for (int n = 0; n < 40; n++) run_op(1'b0, 0);
    release u_reg.t_sum[1][1];

    // counter-stop mode: RC2 of u_stop, sum bit 3 stuck at 1
    force u_stop.rc_sum[2][3] = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [1:0] sel0;
      logic f0;
      @(negedge clk);
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      #1;
      sel0 = s_sel;
      f0 = s_fault;
      if (s_sel == 2'd2) expect_eq("stop-mode sum", {s_cout, s_sum}, ref_sum());
      if (f0) expect_eq("fault only on RC2", {15'h0, s_sel}, {15'h0, 2'd2});
      @(posedge clk);
      #1;
      if (f0) begin
        n_held++;
        expect_eq("held test_sel", {15'h0, s_sel}, {15'h0, sel0});
      end else begin
        expect_eq("stop-mode step", {15'h0, s_sel}, {15'h0, 2'(sel0 + 2'd1)});
      end
    end
    release u_stop.rc_sum[2][3];

    $display("mechanisms: fault_seen=%0d raw_corrected=%0d multi_corrected=%0d test_mismatch=%0d held=%0d",
             n_fault_seen, n_raw_corrected, n_multi_corrected, n_tm_seen, n_held);
    checks++; if (n_fault_seen == 0)      failures++;
    checks++; if (n_raw_corrected == 0)   failures++;
    checks++; if (n_multi_corrected == 0) failures++;
    checks++; if (n_tm_seen == 0)         failures++;
    checks++; if (n_held == 0)            failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
