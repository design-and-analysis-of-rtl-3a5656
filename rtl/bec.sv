// bec: binary to excess-1 converter, y = b + 1 modulo 2^W.
//
// Bit 0 is inverted; every higher bit i is XORed with the AND of all bits
// below it, so a bit flips exactly when every lower bit is 1. The AND terms
// are formed as a chain. It replaces the carry-in-1 ripple adder of a carry
// select adder: the high part is added once with carry 0 and the converter
// gives the carry-1 result. Purely combinational; no carry out (all ones
// wraps to zero).
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0] all_ones_below;

  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end

  assign y = b ^ all_ones_below;

endmodule
