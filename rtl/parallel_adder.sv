// parallel_adder: W-bit ripple carry (parallel) adder built from one-bit
// adder cells.
//
// Bit i computes s[i] = x[i] ^ y[i] ^ c[i] and passes the carry
// c[i+1] = x[i]&y[i] | c[i]&(x[i]^y[i]) to bit i+1, so the carry ripples
// from the least significant cell to the most significant one. With
// MODIFIED = 1 the last cell is only an XOR: the carry out of the top bit
// is not formed and cout is 0, which is the form used in the exponent path
// of the multiplier where that carry is never needed. With MODIFIED = 0 the
// last cell is a full adder and cout is the carry out.
//
// The cell for bit 0 takes the carry input cin; with cin tied to 0 it
// reduces to the half adder of the plain parallel adder. Tying a carry
// input into bit 0 is this design's choice, so that the same adder can
// serve as the carry-in-1 ripple adder of a carry select adder.
//
// Purely combinational.
module parallel_adder #(
  parameter int unsigned W        = 8,
  parameter bit          MODIFIED = 1'b1
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_cell
    assign s[i] = x[i] ^ y[i] ^ c[i];
    if (MODIFIED && i == W - 1) begin : g_xor_cell
      assign c[i+1] = 1'b0;                         // XOR cell: no carry out
    end else begin : g_full_cell
      assign c[i+1] = (x[i] & y[i]) | (c[i] & (x[i] ^ y[i]));
    end
  end

  assign cout = c[W];

endmodule
