// column_adder: sums the N registered partial products of one multiplier
// column of the matrix multiplier, y = ((p[0] + p[1]) + p[2]) + ... .
//
// N-1 two-input floating point adders are chained, so a column of N
// products costs N-1 adders and an N x N array n^2 - n adders in all, the
// count given by the source design. The chain order (row 0 first) is this
// design's choice; it fixes the order of the truncations. overflow and
// underflow are the OR of the flags of the adders in the chain.
//
// Purely combinational.
module column_adder #(
  parameter int unsigned N     = 3,
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] p [N],
  output logic [EXP_W+MAN_W:0] y,
  output logic                 overflow,
  output logic                 underflow
);

  localparam int unsigned FW = EXP_W + MAN_W + 1;

  logic [FW-1:0] acc [N];
  logic [N-1:0]  ovf, unf;

  assign acc[0] = p[0];
  assign ovf[0] = 1'b0;
  assign unf[0] = 1'b0;

  for (genvar k = 1; k < N; k++) begin : g_chain
    fp_adder #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add (
      .a(acc[k-1]), .b(p[k]), .y(acc[k]), .overflow(ovf[k]), .underflow(unf[k])
    );
  end

  assign y         = acc[N-1];
  assign overflow  = |ovf;
  assign underflow = |unf;

endmodule
