// partition_multiplier: unsigned W x W multiplier by operand partitioning,
// p = a * b (2W bits).
//
// Each operand is zero-extended to GROUPS*GW bits (GW = ceil(W/GROUPS)) and
// cut into GROUPS groups of GW bits, group 0 being the least significant.
// Every group of a is multiplied by every group of b, giving GROUPS^2 small
// products (16 for the default of 4 groups); the product of group i of a and
// group j of b is shifted left by (i+j)*GW bits and all shifted products are
// added. With W = 24 (single precision significand) the groups are 6 bits;
// with W = 53 (double precision) the operand is padded to 56 bits and the
// groups are 14 bits.
//
// The four-group split follows the source design; the zero padding of a
// width that does not divide by four, and the plain adder sum of the
// shifted products, are this design's choices. Purely combinational.
module partition_multiplier #(
  parameter int unsigned W      = 24,
  parameter int unsigned GROUPS = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int unsigned GW = (W + GROUPS - 1) / GROUPS;
  localparam int unsigned PW = GW * GROUPS;       // padded operand width

  logic [PW-1:0]   a_pad, b_pad;
  logic [2*GW-1:0] part [GROUPS][GROUPS];
  logic [2*PW-1:0] acc;

  assign a_pad = PW'(a);
  assign b_pad = PW'(b);

  for (genvar i = 0; i < GROUPS; i++) begin : g_a
    for (genvar j = 0; j < GROUPS; j++) begin : g_b
      assign part[i][j] = (2*GW)'(a_pad[i*GW +: GW]) * (2*GW)'(b_pad[j*GW +: GW]);
    end
  end

  always_comb begin
    acc = '0;
    for (int unsigned i = 0; i < GROUPS; i++)
      for (int unsigned j = 0; j < GROUPS; j++)
        acc = acc + ((2*PW)'(part[i][j]) << ((i + j) * GW));
  end

  // The padding bits are zero, so the product fits in 2W bits.
  assign p = acc[2*W-1:0];

  if (PW > W) begin : g_pad
    logic unused_acc_high;
    assign unused_acc_high = ^acc[2*PW-1:2*W];
  end

endmodule
