// ppi_mo_matmul: parallel-parallel input, multi output (PPI-MO) floating
// point matrix multiplier, C = A * B for N x N matrices.
//
// The array holds N x N floating point multipliers M[i][j] (row i, column
// j), N x N product registers and one column adder per multiplier column,
// i.e. N^2 - N two-input adders. Multiplier M[i][j] takes the fixed operand
// a[j][i] and the streamed operand b_col[i]: all multipliers of row i see
// the same element of row i of B. In the cycle that column k of B,
// b_col = (b[0][k], ..., b[N-1][k]), is presented with in_valid, every
// multiplier forms a[j][i] * b[i][k] and the products are captured in the
// registers. The adder of column j then sums its column of registers to
// sum_i a[j][i] * b[i][k] = c[j][k], so the N adders give column k of C:
// C comes out in column-major order, one column per cycle, and a whole
// product takes N cycles of input.
//
// Interface and timing (this design's choices; the array itself follows
// the source design): A is a plain input that must be held stable while
// its columns of B are streamed. b_col is taken on a rising clk edge with
// in_valid high; c_col is valid in the next cycle (out_valid), computed
// combinationally from the product registers. out_col gives the index k of
// the column on c_col, counted from reset, and out_last marks the last
// column (k = N-1) of a product; in_valid may stay high to stream column
// after column and product after product, one column per cycle. c_overflow
// and c_underflow flag, per element, an overflow or underflow in that
// element's multipliers or adders. rst_n is an active-low synchronous
// reset of the valid flag and the column counter.
module ppi_mo_matmul #(
  parameter int unsigned N     = 3,
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [EXP_W+MAN_W:0]     a [N][N],     // a[row][col], held stable
  input  logic                     in_valid,
  input  logic [EXP_W+MAN_W:0]     b_col [N],    // b[0..N-1][k]
  output logic                     out_valid,
  output logic [$clog2(N+1)-1:0]   out_col,
  output logic                     out_last,
  output logic [EXP_W+MAN_W:0]     c_col [N],    // c[0..N-1][k]
  output logic [N-1:0]             c_overflow,
  output logic [N-1:0]             c_underflow
);

  localparam int unsigned FW = EXP_W + MAN_W + 1;
  localparam int unsigned CW = $clog2(N + 1);

  // Multiplier array and product registers, indexed [i][j] as in the array.
  logic [FW-1:0] prod     [N][N];
  logic [FW-1:0] prod_q   [N][N];
  logic [N-1:0]  m_ovf    [N];
  logic [N-1:0]  m_unf    [N];
  logic [N-1:0]  m_ovf_q  [N];
  logic [N-1:0]  m_unf_q  [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      fp_multiplier #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul (
        .a(a[j][i]), .b(b_col[i]), .y(prod[i][j]),
        .overflow(m_ovf[i][j]), .underflow(m_unf[i][j])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      prod_q  <= prod;
      m_ovf_q <= m_ovf;
      m_unf_q <= m_unf;
    end
  end

  // Control: output valid flag and column index.
  logic [CW-1:0] col_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      col_cnt   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_col <= col_cnt;
        col_cnt <= (col_cnt == CW'(N - 1)) ? '0 : col_cnt + 1'b1;
      end
    end
  end

  assign out_last = (out_col == CW'(N - 1));

  // Column adders: adder j sums the products of multiplier column j.
  for (genvar j = 0; j < N; j++) begin : g_sum
    logic [FW-1:0] col_p [N];
    logic          a_ovf, a_unf;
    logic [N-1:0]  col_movf, col_munf;
    for (genvar i = 0; i < N; i++) begin : g_pick
      assign col_p[i]    = prod_q[i][j];
      assign col_movf[i] = m_ovf_q[i][j];
      assign col_munf[i] = m_unf_q[i][j];
    end
    column_adder #(.N(N), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_add (
      .p(col_p), .y(c_col[j]), .overflow(a_ovf), .underflow(a_unf)
    );
    assign c_overflow[j]  = a_ovf | (|col_movf);
    assign c_underflow[j] = a_unf | (|col_munf);
  end

endmodule
