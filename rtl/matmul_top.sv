// matmul_top: single precision and double precision PPI-MO floating point
// matrix multipliers side by side.
//
// Two independent N x N arrays (ppi_mo_matmul), one for IEEE-754 single
// precision (8-bit exponent, 23-bit fraction) and one for double precision
// (11-bit exponent, 52-bit fraction), each with its own ports, prefixed sp_
// and dp_. They share only the clock and reset. Each streams one column of
// B per cycle and returns the matching column of C one cycle later; see
// ppi_mo_matmul for the timing. N = 3 is the size worked through by the
// source design; putting both precisions in one top is this design's choice.
module matmul_top #(
  parameter int unsigned N = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // single precision array
  input  fp_pkg::sp_t         sp_a [N][N],
  input  logic                sp_in_valid,
  input  fp_pkg::sp_t         sp_b_col [N],
  output logic                sp_out_valid,
  output logic [$clog2(N+1)-1:0] sp_out_col,
  output logic                sp_out_last,
  output fp_pkg::sp_t         sp_c_col [N],
  output logic [N-1:0]        sp_c_overflow,
  output logic [N-1:0]        sp_c_underflow,
  // double precision array
  input  fp_pkg::dp_t         dp_a [N][N],
  input  logic                dp_in_valid,
  input  fp_pkg::dp_t         dp_b_col [N],
  output logic                dp_out_valid,
  output logic [$clog2(N+1)-1:0] dp_out_col,
  output logic                dp_out_last,
  output fp_pkg::dp_t         dp_c_col [N],
  output logic [N-1:0]        dp_c_overflow,
  output logic [N-1:0]        dp_c_underflow
);

  ppi_mo_matmul #(.N(N), .EXP_W(fp_pkg::SP_EXP_W), .MAN_W(fp_pkg::SP_MAN_W)) u_sp (
    .clk, .rst_n,
    .a(sp_a), .in_valid(sp_in_valid), .b_col(sp_b_col),
    .out_valid(sp_out_valid), .out_col(sp_out_col), .out_last(sp_out_last),
    .c_col(sp_c_col), .c_overflow(sp_c_overflow), .c_underflow(sp_c_underflow)
  );

  ppi_mo_matmul #(.N(N), .EXP_W(fp_pkg::DP_EXP_W), .MAN_W(fp_pkg::DP_MAN_W)) u_dp (
    .clk, .rst_n,
    .a(dp_a), .in_valid(dp_in_valid), .b_col(dp_b_col),
    .out_valid(dp_out_valid), .out_col(dp_out_col), .out_last(dp_out_last),
    .c_col(dp_c_col), .c_overflow(dp_c_overflow), .c_underflow(dp_c_underflow)
  );

endmodule
