// ksa_top: the two adders of the design side by side.
//
//   - u_ft:  ft_sparse_ksa, the fault-tolerant 16-bit sparse Kogge-Stone
//            adder with on-line testing of its ripple-carry segments and a
//            corrected-sum register (ports ft_*).
//   - u_ksa: kogge_stone_adder, the 32-bit dense Kogge-Stone adder
//            (ports ks_*), purely combinational.
// The two share nothing but the top; each has its own ports. Clock and
// reset serve only the fault-tolerant adder. Timing is that of the two
// blocks (see their headers).
module ksa_top #(
  parameter int unsigned FT_WIDTH      = 16,
  parameter int unsigned FT_SEG        = 4,
  parameter int unsigned KS_WIDTH      = 32,
  localparam int unsigned FT_SW        = (FT_WIDTH / FT_SEG > 1) ? $clog2(FT_WIDTH / FT_SEG) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // fault-tolerant sparse Kogge-Stone adder
  input  logic [FT_WIDTH-1:0] ft_a,
  input  logic [FT_WIDTH-1:0] ft_b,
  input  logic                ft_cin,
  input  logic                ft_stop_on_fault,
  output logic [FT_WIDTH-1:0] ft_sum,
  output logic                ft_cout,
  output logic [FT_WIDTH-1:0] ft_corrected_sum,
  output logic [FT_SW-1:0]    ft_test_sel,
  output logic                ft_fault,
  output logic                ft_test_mismatch,
  // 32-bit Kogge-Stone adder
  input  logic [KS_WIDTH-1:0] ks_a,
  input  logic [KS_WIDTH-1:0] ks_b,
  input  logic                ks_c0,
  output logic [KS_WIDTH-1:0] ks_sum,
  output logic                ks_c32
);

  ft_sparse_ksa #(
    .WIDTH(FT_WIDTH), .SEG(FT_SEG)
  ) u_ft (
    .clk(clk), .rst_n(rst_n),
    .a(ft_a), .b(ft_b), .cin(ft_cin), .stop_on_fault(ft_stop_on_fault),
    .sum(ft_sum), .cout(ft_cout), .corrected_sum(ft_corrected_sum),
    .test_sel(ft_test_sel), .fault(ft_fault), .test_mismatch(ft_test_mismatch)
  );

  kogge_stone_adder #(.WIDTH(KS_WIDTH)) u_ksa (
    .a(ks_a), .b(ks_b), .c0(ks_c0), .sum(ks_sum), .c32(ks_c32)
  );

endmodule
