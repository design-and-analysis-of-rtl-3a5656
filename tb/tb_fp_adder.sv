// tb_fp_adder: checks the single and double precision adders against the
// exact sum truncated to the format. Random operands with same and
// opposite signs and both small and large exponent differences, near
// cancellations (b close to -a), exact cancellation, zero operands,
// overflow and underflow.
module tb_fp_adder;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_cancel = 0;

  logic [31:0] sa, sb, sy;
  logic        s_ovf, s_unf;
  logic [63:0] da, db, dy;
  logic        d_ovf, d_unf;

  fp_adder #(.EXP_W(8),  .MAN_W(23)) dut_sp (.a(sa), .b(sb), .y(sy), .overflow(s_ovf), .underflow(s_unf));
  fp_adder #(.EXP_W(11), .MAN_W(52)) dut_dp (.a(da), .b(db), .y(dy), .overflow(d_ovf), .underflow(d_unf));

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
    e = ref_add(fpw_t'(a), fpw_t'(b), 8, 23, eo, eu);
    checks++;
    if (sy !== e[31:0] || s_ovf !== eo || s_unf !== eu) begin
      failures++;
      if (failures < 10) $display("FAIL sp %h+%h = %h o%b u%b exp %h o%b u%b", a, b, sy, s_ovf, s_unf, e[31:0], eo, eu);
    end
    n_ovf += int'(eo);
    n_unf += int'(eu);
  endtask

  task automatic run_dp(input logic [63:0] a, input logic [63:0] b);
    fpw_t e;
    bit   eo, eu;
    da = a; db = b;
    #1;
    e = ref_add(a, b, 11, 52, eo, eu);
    checks++;
    if (dy !== e || d_ovf !== eo || d_unf !== eu) begin
      failures++;
      if (failures < 10) $display("FAIL dp %h+%h = %h o%b u%b exp %h o%b u%b", a, b, dy, d_ovf, d_unf, e, eo, eu);
    end
    n_ovf += int'(eo);
    n_unf += int'(eu);
  endtask

  initial begin
    logic [31:0] x32;
    logic [63:0] x64;
    // 1 + 2 = 3, 1.5 - 0.25 = 1.25
    run_sp(32'h3F800000, 32'h40000000);
    checks++; if (sy !== 32'h40400000) begin failures++; $display("FAIL 1+2 = %h", sy); end
    run_sp(32'h3FC00000, 32'hBE800000);
    checks++; if (sy !== 32'h3FA00000) begin failures++; $display("FAIL 1.5-0.25 = %h", sy); end
    // exact cancellation and zeros
    run_sp(32'h40490FDB, 32'hC0490FDB);
    run_sp(32'h00000000, 32'hC0490FDB);
    run_sp(32'h00000000, 32'h80000000);
    run_dp(64'h400921FB54442D18, 64'hC00921FB54442D18);
    run_dp(64'h400921FB54442D18, 64'h0);
    // overflow and underflow
    run_sp(32'h7F7FFFFF, 32'h7F7FFFFF);
    run_sp(32'h00800001, 32'h80800000);
    run_dp(64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF);
    run_dp(64'h0010000000000001, 64'h8010000000000000);
    for (int k = 0; k < 20000; k++) begin
      run_sp(32'(rand_fp(8, 23, 20)), 32'(rand_fp(8, 23, 20)));
      run_dp(rand_fp(11, 52, 40), rand_fp(11, 52, 40));
      // b close to -a: same or neighbouring exponent, opposite sign
      x32 = 32'(rand_fp(8, 23, 100));
      run_sp(x32, {~x32[31], x32[30:23] - 8'($urandom % 2), x32[22:0] ^ 23'($urandom % 16)});
      x64 = rand_fp(11, 52, 1000);
      run_dp(x64, {~x64[63], x64[62:52] - 11'($urandom % 2), x64[51:0] ^ 52'($urandom % 64)});
      if (sy[30:23] + 8'd3 < x32[30:23]) n_cancel++;
    end
    run_sp(32'h7F000000, 32'h7F000000);
    run_sp(32'h00C00000, 32'h80A00000);
    if (n_ovf == 0 || n_unf == 0 || n_cancel == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d cancel=%0d", n_ovf, n_unf, n_cancel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
