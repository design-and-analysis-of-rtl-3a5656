// tb_fp_multiplier: checks the single and double precision multipliers
// against an exact reference product truncated to the format. Random
// operands over a wide exponent range, plus directed cases: zero operands,
// exact powers of two, products that need and do not need the
// normalisation shift, overflow to infinity and underflow to zero.
module tb_fp_multiplier;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_norm = 0;

  logic [31:0] sa, sb, sy;
  logic        s_ovf, s_unf;
  logic [63:0] da, db, dy;
  logic        d_ovf, d_unf;

  fp_multiplier #(.EXP_W(8),  .MAN_W(23)) dut_sp (.a(sa), .b(sb), .y(sy), .overflow(s_ovf), .underflow(s_unf));
  fp_multiplier #(.EXP_W(11), .MAN_W(52)) dut_dp (.a(da), .b(db), .y(dy), .overflow(d_ovf), .underflow(d_unf));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sp(input logic [31:0] a, input logic [31:0] b);
    fpw_t e;
    bit   eo, eu;
    sa = a; sb = b;
    #1;
    e = ref_mul(fpw_t'(a), fpw_t'(b), 8, 23, eo, eu);
    checks++;
    if (sy !== e[31:0] || s_ovf !== eo || s_unf !== eu) begin
      failures++;
      if (failures < 10) $display("FAIL sp %h*%h = %h o%b u%b exp %h o%b u%b", a, b, sy, s_ovf, s_unf, e[31:0], eo, eu);
    end
    n_ovf += int'(eo);
    n_unf += int'(eu);
  endtask

  task automatic run_dp(input logic [63:0] a, input logic [63:0] b);
    fpw_t e;
    bit   eo, eu;
    da = a; db = b;
    #1;
    e = ref_mul(a, b, 11, 52, eo, eu);
    checks++;
    if (dy !== e || d_ovf !== eo || d_unf !== eu) begin
      failures++;
      if (failures < 10) $display("FAIL dp %h*%h = %h o%b u%b exp %h o%b u%b", a, b, dy, d_ovf, d_unf, e, eo, eu);
    end
    n_ovf += int'(eo);
    n_unf += int'(eu);
  endtask

  initial begin
    // 1.5 * 1.5 = 2.25 (normalisation shift), 2 * 3 = 6, -1 * 0.5
    run_sp(32'h3FC00000, 32'h3FC00000);
    checks++; if (sy !== 32'h40100000) begin failures++; $display("FAIL 1.5*1.5 = %h", sy); end
    run_sp(32'h40000000, 32'h40400000);
    checks++; if (sy !== 32'h40C00000) begin failures++; $display("FAIL 2*3 = %h", sy); end
    run_sp(32'hBF800000, 32'h3F000000);
    checks++; if (sy !== 32'hBF000000) begin failures++; $display("FAIL -1*0.5 = %h", sy); end
    run_dp(64'h3FF8000000000000, 64'h3FF8000000000000);
    checks++; if (dy !== 64'h4002000000000000) begin failures++; $display("FAIL dp 1.5*1.5 = %h", dy); end
    // zeros
    run_sp(32'h00000000, 32'h40400000);
    run_sp(32'hC0400000, 32'h00000000);
    run_dp(64'h0, 64'h4008000000000000);
    // overflow and underflow
    run_sp(32'h7F000000, 32'h7F000000);
    run_sp(32'h00800000, 32'h00800000);
    run_sp(32'h3F800000, 32'h7F7FFFFF);
    run_dp(64'h7FE0000000000000, 64'h4000000000000000);
    run_dp(64'h0010000000000000, 64'h3FE0000000000000);
    for (int k = 0; k < 20000; k++) begin
      run_sp(32'(rand_fp(8, 23, 126)), 32'(rand_fp(8, 23, 126)));
      run_dp(rand_fp(11, 52, 1022), rand_fp(11, 52, 1022));
      if (dut_sp.ne) n_norm++;
    end
    if (n_ovf == 0 || n_unf == 0 || n_norm == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d norm=%0d", n_ovf, n_unf, n_norm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
