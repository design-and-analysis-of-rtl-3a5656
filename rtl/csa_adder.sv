// csa_adder: modified carry select adder for the exponent path,
// s = x + y + cin modulo 2^W.
//
// The operands are cut into a low part of LOW_W bits and a high part of
// W-LOW_W bits. The low part is added by a ripple carry adder that produces
// its carry out. The high part is added once with carry 0 by a modified
// ripple adder (no carry out), and its carry-1 result is formed in parallel:
// by a binary to excess-1 converter when USE_BEC = 1 (the preferred,
// smaller form) or by a second ripple adder with carry input 1 when
// USE_BEC = 0 (the dual ripple adder form). The low carry selects which
// high result is used. As in the modified parallel adder, no carry out of
// the top bit is produced: the exponent arithmetic it serves works modulo
// 2^W.
//
// The variant names follow the source design; the even split of the
// operands (LOW_W = W/2) is this design's choice. Purely combinational.
module csa_adder #(
  parameter int unsigned W       = 8,
  parameter int unsigned LOW_W   = W / 2,
  parameter bit          USE_BEC = 1'b1
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s
);

  localparam int unsigned HIGH_W = W - LOW_W;

  logic [LOW_W-1:0]  s_low;
  logic              c_low;
  logic [HIGH_W-1:0] s_high0, s_high1;
  logic              unused_c0;

  parallel_adder #(.W(LOW_W), .MODIFIED(1'b0)) u_low (
    .x(x[LOW_W-1:0]), .y(y[LOW_W-1:0]), .cin(cin), .s(s_low), .cout(c_low)
  );

  parallel_adder #(.W(HIGH_W), .MODIFIED(1'b1)) u_high0 (
    .x(x[W-1:LOW_W]), .y(y[W-1:LOW_W]), .cin(1'b0), .s(s_high0), .cout(unused_c0)
  );

  if (USE_BEC) begin : g_bec
    bec #(.W(HIGH_W)) u_bec (.b(s_high0), .y(s_high1));
  end else begin : g_dual_rca
    logic unused_c1;
    parallel_adder #(.W(HIGH_W), .MODIFIED(1'b1)) u_high1 (
      .x(x[W-1:LOW_W]), .y(y[W-1:LOW_W]), .cin(1'b1), .s(s_high1), .cout(unused_c1)
    );
  end

  assign s = {c_low ? s_high1 : s_high0, s_low};

endmodule
