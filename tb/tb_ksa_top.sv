// tb_ksa_top: end-to-end test of ksa_top with every parameter at its default
// (16-bit fault-tolerant sparse Kogge-Stone adder, 32-bit Kogge-Stone adder).
//
// Fault-tolerant adder: operand pairs are held 4 cycles each, first
// fault-free, then with a stuck-at fault forced onto a sum bit of RC0, then
// with RC0 and RC2 both faulty, then with one test RC faulty. After every
// 4 cycles ft_corrected_sum must equal a + b (low 16 bits) and ft_cout the
// carry-out; fault-free, ft_sum must be right every cycle. The 32-bit adder
// is driven every cycle with random and full-carry-chain operands and
// checked against a + b + c0. Last, the mode input ft_stop_on_fault is set
// with RC3 faulty: the test counter must hold while the fault is flagged,
// and ft_sum must then be right in every cycle.
// Counted mechanisms, each of which must happen at least once: a fault
// flagged by the comparator, a wrong raw RCA sum repaired in the register,
// two faulty RCAs repaired in one pass, a test-RC mismatch, a 16-bit
// carry-out, and a carry rippling through all 32 bits of the Kogge-Stone
// adder, the test counter held by a fault.
module tb_ksa_top;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] ft_a = '0, ft_b = '0, ft_sum, ft_csum;
  logic ft_cin = 1'b0, ft_stop = 1'b0, ft_cout, ft_fault, ft_tm;
  logic [1:0] ft_sel;
  logic [31:0] ks_a = '0, ks_b = '0, ks_sum;
  logic ks_c0 = 1'b0, ks_c32;

  int checks = 0, failures = 0;
  int n_fault = 0, n_repaired = 0, n_multi = 0, n_tm = 0, n_cout = 0, n_chain = 0, n_held = 0;

  ksa_top dut (
    .clk(clk), .rst_n(rst_n),
    .ft_a(ft_a), .ft_b(ft_b), .ft_cin(ft_cin), .ft_stop_on_fault(ft_stop),
    .ft_sum(ft_sum), .ft_cout(ft_cout), .ft_corrected_sum(ft_csum),
    .ft_test_sel(ft_sel), .ft_fault(ft_fault), .ft_test_mismatch(ft_tm),
    .ks_a(ks_a), .ks_b(ks_b), .ks_c0(ks_c0), .ks_sum(ks_sum), .ks_c32(ks_c32)
  );

  always #5 clk = ~clk;

  task automatic check_ks();
    logic [32:0] e;
    e = 33'(ks_a) + 33'(ks_b) + 33'(ks_c0);
    checks++;
    if ({ks_c32, ks_sum} !== e) begin
      failures++;
      $display("FAIL ks a=%h b=%h c0=%b got=%b_%h exp=%h", ks_a, ks_b, ks_c0, ks_c32, ks_sum, e);
    end
    if (ks_sum == 32'h0 && ks_c32 && ks_a == 32'hffff_ffff) n_chain++;
  endtask

  task automatic new_ks();
    ks_c0 = 1'($urandom);
    case ($urandom_range(0, 3))
      0: begin ks_a = 32'hffff_ffff; ks_b = 32'h0; ks_c0 = 1'b1; end
      default: begin ks_a = $urandom; ks_b = $urandom; end
    endcase
  endtask

  task automatic run_op(bit clean, int nfaulty);
    logic [16:0] e;
    bit raw_wrong = 1'b0;
    @(negedge clk);
    ft_a = 16'($urandom); ft_b = 16'($urandom); ft_cin = 1'($urandom);
    e = 17'(ft_a) + 17'(ft_b) + 17'(ft_cin);
    for (int cyc = 0; cyc < 4; cyc++) begin
      new_ks();
      #1;
      check_ks();
      checks++;
      if (ft_cout !== e[16]) begin failures++; $display("FAIL ft_cout"); end
      if (clean) begin
        checks++;
        if (ft_sum !== e[15:0] || ft_fault || ft_tm) begin
          failures++;
          $display("FAIL ft clean a=%h b=%h sum=%h exp=%h f=%b tm=%b", ft_a, ft_b, ft_sum, e, ft_fault, ft_tm);
        end
      end
      if (dut.u_ft.rc_sum != e[15:0]) raw_wrong = 1'b1;
      if (ft_fault) n_fault++;
      if (ft_tm) n_tm++;
      @(negedge clk);
    end
    checks++;
    if (ft_csum !== e[15:0]) begin
      failures++;
      $display("FAIL ft corrected a=%h b=%h cin=%b got=%h exp=%h", ft_a, ft_b, ft_cin, ft_csum, e);
    end else if (raw_wrong) begin
      n_repaired++;
      if (nfaulty > 1) n_multi++;
    end
    if (e[16]) n_cout++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int n = 0; n < 100; n++) run_op(1'b1, 0);
    force dut.u_ft.rc_sum[0][1] = 1'b1;
    for (int n = 0; n < 50; n++) run_op(1'b0, 1);
    force dut.u_ft.rc_sum[2][3] = 1'b0;
    for (int n = 0; n < 50; n++) run_op(1'b0, 2);
    release dut.u_ft.rc_sum[0][1];
    release dut.u_ft.rc_sum[2][3];
    force dut.u_ft.t_sum[0][2] = 1'b1;
    for (int n = 0; n < 50; n++) run_op(1'b0, 0);
    release dut.u_ft.t_sum[0][2];
    for (int n = 0; n < 20; n++) run_op(1'b1, 0);

    // counter-stop mode: RC3 faulty; once found, RC3 stays under test and
    // ft_sum is right every cycle while it is
    ft_stop = 1'b1;
    force dut.u_ft.rc_sum[3][2] = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [16:0] e;
      logic [1:0] sel0;
      logic f0;
      @(negedge clk);
      ft_a = 16'($urandom); ft_b = 16'($urandom); ft_cin = 1'($urandom);
      e = 17'(ft_a) + 17'(ft_b) + 17'(ft_cin);
      new_ks();
      #1;
      check_ks();
      sel0 = ft_sel;
      f0 = ft_fault;
      if (ft_sel == 2'd3) begin
        checks++;
        if ({ft_cout, ft_sum} !== e) begin
          failures++;
          $display("FAIL stop-mode sum a=%h b=%h got=%h exp=%h", ft_a, ft_b, ft_sum, e);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (ft_sel !== (f0 ? sel0 : 2'(sel0 + 2'd1))) begin
        failures++;
        $display("FAIL stop-mode counter sel0=%0d f=%b sel=%0d", sel0, f0, ft_sel);
      end
      if (f0) n_held++;
    end
    release dut.u_ft.rc_sum[3][2];
    ft_stop = 1'b0;

    $display("mechanisms: fault=%0d repaired=%0d multi_repaired=%0d test_mismatch=%0d cout=%0d ks_full_chain=%0d counter_held=%0d",
             n_fault, n_repaired, n_multi, n_tm, n_cout, n_chain, n_held);
    checks++; if (n_held == 0)     failures++;
    checks++; if (n_fault == 0)    failures++;
    checks++; if (n_repaired == 0) failures++;
    checks++; if (n_multi == 0)    failures++;
    checks++; if (n_tm == 0)       failures++;
    checks++; if (n_cout == 0)     failures++;
    checks++; if (n_chain == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
