// mm_stream_checker: stimulus and scoreboard for one PPI-MO matrix
// multiplier port set (see ppi_mo_matmul).
//
// After start, it multiplies NUM_MATS random pairs of N x N matrices. For
// each pair it drives A, then streams the N columns of B, one per cycle
// with in_valid, sometimes leaving idle cycles between columns and
// sometimes starting the next product right after the last column of the
// previous one. Every column of C is predicted with the exact reference
// arithmetic (products, then the sum down the column in row order, each
// step truncated) and checked, with its flags, index and last marker,
// exactly one cycle after its column of B was taken. Matrix pairs cycle
// through kinds that make each mechanism happen: ordinary values, an
// overflowing element, an underflowing element, an exactly cancelling sum
// and zero operands. A is changed only while no column is in flight.
module mm_stream_checker #(
  parameter int unsigned N        = 3,
  parameter int unsigned EXP_W    = 8,
  parameter int unsigned MAN_W    = 23,
  parameter int unsigned NUM_MATS = 10
) (
  input  logic                   clk,
  input  logic                   start,
  output logic [EXP_W+MAN_W:0]   a [N][N],
  output logic                   in_valid,
  output logic [EXP_W+MAN_W:0]   b_col [N],
  input  logic                   out_valid,
  input  logic [$clog2(N+1)-1:0] out_col,
  input  logic                   out_last,
  input  logic [EXP_W+MAN_W:0]   c_col [N],
  input  logic [N-1:0]           c_overflow,
  input  logic [N-1:0]           c_underflow,
  output logic                   done
);
  import fp_ref_pkg::*;

  localparam int FW = EXP_W + MAN_W + 1;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_cancel = 0, n_zero_in = 0, n_gap = 0, n_b2b = 0, n_cols = 0;

  typedef struct {
    fpw_t        c [N];
    logic [N-1:0] ovf;
    logic [N-1:0] unf;
    int          col;
    longint      due;
  } exp_t;

  exp_t   pending [$];
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic fpw_t rnd(input int spread);
    return rand_fp(EXP_W, MAN_W, spread);
  endfunction

  // Expected column k of C = A * B, due at the given cycle.
  function automatic exp_t predict(input fpw_t am [N][N], input fpw_t bm [N][N], input int k,
                                   input longint due);
    exp_t e;
    fpw_t acc, p;
    bit   o, u;
    acc = '0;
    for (int j = 0; j < N; j++) begin
      e.ovf[j] = 1'b0;
      e.unf[j] = 1'b0;
      for (int i = 0; i < N; i++) begin
        p = ref_mul(am[j][i], bm[i][k], EXP_W, MAN_W, o, u);
        e.ovf[j] |= o;
        e.unf[j] |= u;
        if (i == 0) acc = p;
        else begin
          acc = ref_add(acc, p, EXP_W, MAN_W, o, u);
          e.ovf[j] |= o;
          e.unf[j] |= u;
        end
      end
      e.c[j] = acc;
    end
    e.col = k;
    e.due = due;
    return e;
  endfunction

  // Scoreboard: compare on the falling edge after each output.
  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL unexpected output column at cycle %0d", cycle);
      end else begin
        e = pending.pop_front();
        if (e.due != cycle || int'(out_col) != e.col || out_last !== (e.col == N - 1)) begin
          failures++;
          $display("FAIL timing/index: cycle %0d due %0d col %0d exp %0d", cycle, e.due, out_col, e.col);
        end
        for (int j = 0; j < N; j++) begin
          checks++;
          if (c_col[j] !== FW'(e.c[j]) || c_overflow[j] !== e.ovf[j] || c_underflow[j] !== e.unf[j]) begin
            failures++;
            if (failures < 10)
              $display("FAIL c[%0d][%0d] = %h o%b u%b exp %h o%b u%b", j, e.col, c_col[j],
                       c_overflow[j], c_underflow[j], FW'(e.c[j]), e.ovf[j], e.unf[j]);
          end
          n_ovf    += int'(e.ovf[j]);
          n_unf    += int'(e.unf[j]);
        end
      end
    end
  end

  initial begin
    fpw_t am [N][N];
    fpw_t bm [N][N];
    done     = 1'b0;
    in_valid = 1'b0;
    for (int r = 0; r < N; r++) begin
      b_col[r] = '0;
      for (int c = 0; c < N; c++) a[r][c] = '0;
    end
    wait (start);
    for (int m = 0; m < NUM_MATS; m++) begin
      int kind;
      kind = m % 5;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          am[r][c] = rnd(30);
          bm[r][c] = rnd(30);
        end
      case (kind)
        1: begin  // one element far too large
          am[0][0] = pack(0, (1 << EXP_W) - 2, '0, EXP_W, MAN_W);
          bm[0][1] = pack(1, (1 << EXP_W) - 3, '0, EXP_W, MAN_W);
        end
        2: begin  // one element far too small
          am[N-1][0] = pack(0, 2, '0, EXP_W, MAN_W);
          bm[0][N-1] = pack(0, 3, '0, EXP_W, MAN_W);
          for (int i = 1; i < N; i++) am[N-1][i] = pack(1, 1, '0, EXP_W, MAN_W);
        end
        3: begin  // c[1][k] starts with x*y - x*y = 0
          am[1][1] = am[1][0];
          for (int k = 0; k < N; k++) bm[1][k] = bm[0][k] ^ (fpw_t'(1) << (EXP_W + MAN_W));
          n_cancel += N;
        end
        4: begin  // zero operands
          am[0][N-1] = '0;
          bm[N-1][0] = '0;
          n_zero_in++;
        end
        default: ;
      endcase
      // Change A only when nothing is in flight.
      @(negedge clk);
      while (pending.size() != 0) @(negedge clk);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) a[r][c] = FW'(am[r][c]);
      for (int k = 0; k < N; k++) begin
        if ($urandom % 4 == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
          n_gap++;
        end
        in_valid = 1'b1;
        for (int i = 0; i < N; i++) b_col[i] = FW'(bm[i][k]);
        pending.push_back(predict(am, bm, k, cycle + 1));
        n_cols++;
        @(negedge clk);
      end
      // Next product right away (A is held) for odd m, else drain.
      if (m % 2 == 1 && m + 1 < NUM_MATS) begin
        for (int k = 0; k < N; k++) begin
          for (int i = 0; i < N; i++) bm[i][k] = rnd(30);
          for (int i = 0; i < N; i++) b_col[i] = FW'(bm[i][k]);
          in_valid = 1'b1;
          pending.push_back(predict(am, bm, k, cycle + 1));
          n_cols++;
          if (k == 0) n_b2b++;
          @(negedge clk);
        end
      end
      in_valid = 1'b0;
    end
    @(negedge clk);
    @(negedge clk);
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d columns never came out", pending.size());
    end
    done = 1'b1;
  end

endmodule
