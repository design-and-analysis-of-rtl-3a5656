// tb_workload_3x3: the 3 x 3 matrix-matrix product workload on matmul_top
// at its default size, in single and double precision at once.
//
// A = [1 2 3; 4 5 6; 7 8 9] and B = [9 8 7; 6 5 4; 3 2 1] are integers,
// so every product and partial sum is exact and C is known by hand:
// C = [30 24 18; 84 69 54; 138 114 90]. A second product scales A by -0.5
// (C scales by -0.5, still exact). The columns of B are streamed back to
// back; the test checks every element of C, that column k of C appears
// with index k one cycle after column k of B, and that each 3 x 3
// product takes exactly 3 cycles: the last column of C is on the outputs
// once the third clock edge counted from the one that takes the first
// column of B has passed.
module tb_workload_3x3;
  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  fp_pkg::sp_t sp_a [N][N];
  fp_pkg::sp_t sp_b [N];
  fp_pkg::sp_t sp_c [N];
  fp_pkg::dp_t dp_a [N][N];
  fp_pkg::dp_t dp_b [N];
  fp_pkg::dp_t dp_c [N];
  logic        in_valid = 1'b0;
  logic        sp_ov, sp_last, dp_ov, dp_last;
  logic [$clog2(N+1)-1:0] sp_col, dp_col;
  logic [N-1:0] sp_ovf, sp_unf, dp_ovf, dp_unf;

  matmul_top dut (
    .clk, .rst_n,
    .sp_a, .sp_in_valid(in_valid), .sp_b_col(sp_b), .sp_out_valid(sp_ov), .sp_out_col(sp_col),
    .sp_out_last(sp_last), .sp_c_col(sp_c), .sp_c_overflow(sp_ovf), .sp_c_underflow(sp_unf),
    .dp_a, .dp_in_valid(in_valid), .dp_b_col(dp_b), .dp_out_valid(dp_ov), .dp_out_col(dp_col),
    .dp_out_last(dp_last), .dp_c_col(dp_c), .dp_c_overflow(dp_ovf), .dp_c_underflow(dp_unf)
  );

  int checks = 0, failures = 0;

  // Exact conversion of a small real (integer multiple of 0.5) to each format.
  function automatic fp_pkg::dp_t to_dp(input real v);
    return fp_pkg::dp_t'($realtobits(v));
  endfunction

  function automatic fp_pkg::sp_t to_sp(input real v);
    logic [63:0] d;
    d = $realtobits(v);
    if (d[62:0] == '0) return fp_pkg::sp_t'({d[63], 31'd0});
    return fp_pkg::sp_t'({d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]});
  endfunction

  const int AI [N][N] = '{'{1, 2, 3}, '{4, 5, 6}, '{7, 8, 9}};
  const int BI [N][N] = '{'{9, 8, 7}, '{6, 5, 4}, '{3, 2, 1}};
  const int CI [N][N] = '{'{30, 24, 18}, '{84, 69, 54}, '{138, 114, 90}};

  real    scale;
  longint cycle = 0;
  longint first_in;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_col(input int k);
    for (int j = 0; j < N; j++) begin
      checks += 2;
      if (sp_c[j] !== to_sp(scale * CI[j][k])) begin
        failures++;
        $display("FAIL sp c[%0d][%0d] = %h exp %h", j, k, sp_c[j], to_sp(scale * CI[j][k]));
      end
      if (dp_c[j] !== to_dp(scale * CI[j][k])) begin
        failures++;
        $display("FAIL dp c[%0d][%0d] = %h exp %h", j, k, dp_c[j], to_dp(scale * CI[j][k]));
      end
    end
    checks++;
    if (!sp_ov || !dp_ov || int'(sp_col) != k || int'(dp_col) != k ||
        sp_last !== (k == N - 1) || dp_last !== (k == N - 1) ||
        sp_ovf != '0 || sp_unf != '0 || dp_ovf != '0 || dp_unf != '0) begin
      failures++;
      $display("FAIL column %0d control: valid %b/%b col %0d/%0d", k, sp_ov, dp_ov, sp_col, dp_col);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      scale = (m == 0) ? 1.0 : -0.5;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          sp_a[r][c] = to_sp(((m == 0) ? 1.0 : -0.5) * AI[r][c]);
          dp_a[r][c] = to_dp(((m == 0) ? 1.0 : -0.5) * AI[r][c]);
        end
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        for (int i = 0; i < N; i++) begin
          sp_b[i] = to_sp(real'(BI[i][k]));
          dp_b[i] = to_dp(real'(BI[i][k]));
        end
        in_valid = 1'b1;
        if (k == 0) first_in = cycle;
        @(negedge clk);
        check_col(k);
      end
      in_valid = 1'b0;
      checks++;
      if (cycle - first_in != N) begin
        failures++;
        $display("FAIL product took %0d cycles, expected %0d", cycle - first_in, N);
      end
      @(negedge clk);
      checks++;
      if (sp_ov || dp_ov) begin
        failures++;
        $display("FAIL output valid after the last column");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
