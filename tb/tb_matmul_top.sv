// tb_matmul_top: end-to-end test of matmul_top at its default size (3 x 3
// arrays in single and double precision), both arrays running at once.
// For each precision, mm_stream_checker streams 60 matrix pairs and checks
// every column of C, its flags, index and last marker, and its arrival
// exactly one cycle after its column of B. Counts how often each
// mechanism happened (idle cycles between columns, back-to-back products,
// overflow, underflow, exact cancellation in a column sum, zero operands)
// and fails if one never did.
module tb_matmul_top;
  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  fp_pkg::sp_t sp_a [N][N];
  fp_pkg::sp_t sp_b [N];
  fp_pkg::sp_t sp_c [N];
  fp_pkg::dp_t dp_a [N][N];
  fp_pkg::dp_t dp_b [N];
  fp_pkg::dp_t dp_c [N];
  logic [31:0] sp_a_w [N][N];
  logic [31:0] sp_b_w [N];
  logic [31:0] sp_c_w [N];
  logic [63:0] dp_a_w [N][N];
  logic [63:0] dp_b_w [N];
  logic [63:0] dp_c_w [N];
  logic        sp_iv, sp_ov, sp_last, sp_done;
  logic        dp_iv, dp_ov, dp_last, dp_done;
  logic [$clog2(N+1)-1:0] sp_col, dp_col;
  logic [N-1:0] sp_ovf, sp_unf, dp_ovf, dp_unf;

  always_comb begin
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        sp_a[r][c] = sp_a_w[r][c];
        dp_a[r][c] = dp_a_w[r][c];
      end
      sp_b[r]   = sp_b_w[r];
      dp_b[r]   = dp_b_w[r];
      sp_c_w[r] = sp_c[r];
      dp_c_w[r] = dp_c[r];
    end
  end

  matmul_top dut (
    .clk, .rst_n,
    .sp_a, .sp_in_valid(sp_iv), .sp_b_col(sp_b), .sp_out_valid(sp_ov), .sp_out_col(sp_col),
    .sp_out_last(sp_last), .sp_c_col(sp_c), .sp_c_overflow(sp_ovf), .sp_c_underflow(sp_unf),
    .dp_a, .dp_in_valid(dp_iv), .dp_b_col(dp_b), .dp_out_valid(dp_ov), .dp_out_col(dp_col),
    .dp_out_last(dp_last), .dp_c_col(dp_c), .dp_c_overflow(dp_ovf), .dp_c_underflow(dp_unf)
  );

  mm_stream_checker #(.N(N), .EXP_W(8), .MAN_W(23), .NUM_MATS(60)) chk_sp (
    .clk, .start, .a(sp_a_w), .in_valid(sp_iv), .b_col(sp_b_w), .out_valid(sp_ov),
    .out_col(sp_col), .out_last(sp_last), .c_col(sp_c_w), .c_overflow(sp_ovf),
    .c_underflow(sp_unf), .done(sp_done)
  );

  mm_stream_checker #(.N(N), .EXP_W(11), .MAN_W(52), .NUM_MATS(60)) chk_dp (
    .clk, .start, .a(dp_a_w), .in_valid(dp_iv), .b_col(dp_b_w), .out_valid(dp_ov),
    .out_col(dp_col), .out_last(dp_last), .c_col(dp_c_w), .c_overflow(dp_ovf),
    .c_underflow(dp_unf), .done(dp_done)
  );

  int checks, failures;

  task automatic report();
    checks   = chk_sp.checks + chk_dp.checks;
    failures = chk_sp.failures + chk_dp.failures;
    $display("SP: cols=%0d gaps=%0d b2b=%0d ovf=%0d unf=%0d cancel=%0d zero_in=%0d",
             chk_sp.n_cols, chk_sp.n_gap, chk_sp.n_b2b, chk_sp.n_ovf, chk_sp.n_unf,
             chk_sp.n_cancel, chk_sp.n_zero_in);
    $display("DP: cols=%0d gaps=%0d b2b=%0d ovf=%0d unf=%0d cancel=%0d zero_in=%0d",
             chk_dp.n_cols, chk_dp.n_gap, chk_dp.n_b2b, chk_dp.n_ovf, chk_dp.n_unf,
             chk_dp.n_cancel, chk_dp.n_zero_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    chk_sp.failures++;
    $display("FAIL watchdog");
    report();
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    wait (sp_done && dp_done);
    if (chk_sp.n_gap == 0 || chk_sp.n_b2b == 0 || chk_sp.n_ovf == 0 || chk_sp.n_unf == 0 ||
        chk_sp.n_cancel == 0 || chk_sp.n_zero_in == 0 ||
        chk_dp.n_gap == 0 || chk_dp.n_b2b == 0 || chk_dp.n_ovf == 0 || chk_dp.n_unf == 0 ||
        chk_dp.n_cancel == 0 || chk_dp.n_zero_in == 0) begin
      chk_sp.failures++;
      $display("FAIL a mechanism never occurred");
    end
    report();
    $finish;
  end
endmodule
