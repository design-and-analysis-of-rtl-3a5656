// tb_ppi_mo_matmul: end-to-end test of the PPI-MO array at N = 3 in single
// precision and N = 4 in double precision. mm_stream_checker streams
// matrix pairs and checks every column of C, its flags, its column index
// and that it appears exactly one cycle after its column of B, so that a
// whole N x N product takes N cycles of input. Fails if any mechanism
// (idle cycles, back-to-back products, overflow, underflow, cancellation,
// zero operands) never occurred.
module tb_ppi_mo_matmul;
  localparam int N1 = 3;
  localparam int N2 = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  // single precision, N = 3 (the default configuration)
  logic [31:0]          a1 [N1][N1];
  logic [31:0]          b1 [N1];
  logic [31:0]          c1 [N1];
  logic                 iv1, ov1, last1, done1;
  logic [$clog2(N1+1)-1:0] col1;
  logic [N1-1:0]        ovf1, unf1;

  ppi_mo_matmul dut_sp (
    .clk, .rst_n, .a(a1), .in_valid(iv1), .b_col(b1), .out_valid(ov1), .out_col(col1),
    .out_last(last1), .c_col(c1), .c_overflow(ovf1), .c_underflow(unf1)
  );
  mm_stream_checker #(.N(N1), .EXP_W(8), .MAN_W(23), .NUM_MATS(40)) chk_sp (
    .clk, .start, .a(a1), .in_valid(iv1), .b_col(b1), .out_valid(ov1), .out_col(col1),
    .out_last(last1), .c_col(c1), .c_overflow(ovf1), .c_underflow(unf1), .done(done1)
  );

  // double precision, N = 4
  logic [63:0]          a2 [N2][N2];
  logic [63:0]          b2 [N2];
  logic [63:0]          c2 [N2];
  logic                 iv2, ov2, last2, done2;
  logic [$clog2(N2+1)-1:0] col2;
  logic [N2-1:0]        ovf2, unf2;

  ppi_mo_matmul #(.N(N2), .EXP_W(11), .MAN_W(52)) dut_dp (
    .clk, .rst_n, .a(a2), .in_valid(iv2), .b_col(b2), .out_valid(ov2), .out_col(col2),
    .out_last(last2), .c_col(c2), .c_overflow(ovf2), .c_underflow(unf2)
  );
  mm_stream_checker #(.N(N2), .EXP_W(11), .MAN_W(52), .NUM_MATS(40)) chk_dp (
    .clk, .start, .a(a2), .in_valid(iv2), .b_col(b2), .out_valid(ov2), .out_col(col2),
    .out_last(last2), .c_col(c2), .c_overflow(ovf2), .c_underflow(unf2), .done(done2)
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
    wait (done1 && done2);
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
