// tb_column_adder: checks the chained column adder (3 single precision
// inputs, 4 double precision inputs) against the same chain of exact,
// truncated reference sums, ((p0 + p1) + p2) + ..., with the OR of the
// reference overflow and underflow flags.
module tb_column_adder;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [31:0] sp_p [3];
  logic [31:0] sp_y;
  logic        sp_o, sp_u;
  logic [63:0] dp_p [4];
  logic [63:0] dp_y;
  logic        dp_o, dp_u;

  column_adder #(.N(3), .EXP_W(8),  .MAN_W(23)) dut_sp (.p(sp_p), .y(sp_y), .overflow(sp_o), .underflow(sp_u));
  column_adder #(.N(4), .EXP_W(11), .MAN_W(52)) dut_dp (.p(dp_p), .y(dp_y), .overflow(dp_o), .underflow(dp_u));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fpw_t acc;
    bit   o, u, eo, eu;
    for (int k = 0; k < 10000; k++) begin
      for (int i = 0; i < 3; i++) sp_p[i] = 32'(rand_fp(8, 23, (k % 2) ? 10 : 126));
      for (int i = 0; i < 4; i++) dp_p[i] = rand_fp(11, 52, (k % 2) ? 30 : 1022);
      if (k % 7 == 0) sp_p[1] = {~sp_p[0][31], sp_p[0][30:0]};
      #1;
      acc = fpw_t'(sp_p[0]); eo = 0; eu = 0;
      for (int i = 1; i < 3; i++) begin
        acc = ref_add(acc, fpw_t'(sp_p[i]), 8, 23, o, u);
        eo |= o; eu |= u;
      end
      checks++;
      if (sp_y !== acc[31:0] || sp_o !== eo || sp_u !== eu) begin
        failures++;
        if (failures < 10) $display("FAIL sp %h %h %h = %h exp %h", sp_p[0], sp_p[1], sp_p[2], sp_y, acc[31:0]);
      end
      acc = dp_p[0]; eo = 0; eu = 0;
      for (int i = 1; i < 4; i++) begin
        acc = ref_add(acc, dp_p[i], 11, 52, o, u);
        eo |= o; eu |= u;
      end
      checks++;
      if (dp_y !== acc || dp_o !== eo || dp_u !== eu) begin
        failures++;
        if (failures < 10) $display("FAIL dp = %h exp %h", dp_y, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
