// fp_multiplier: IEEE-754 binary floating point multiplier, y = a * b, for
// normalised operands of EXP_W exponent bits and MAN_W fraction bits
// (8/23 for single precision, 11/52 for double precision).
//
// The three fields are handled separately:
//  * sign: the two sign bits are XORed;
//  * significand: the two significands with their hidden 1 are multiplied
//    by the partition multiplier (four groups per operand, 16 products);
//  * exponent: the biased exponents are added by a carry select adder, the
//    bias is subtracted by a second one (adding its two's complement) and a
//    third one adds the normalisation increment NE.
// Normalisation: the 2(MAN_W+1)-bit product of two significands in [1,2)
// lies in [1,4). If its top bit is set it is shifted right by one and NE = 1,
// otherwise NE = 0; the bits below the leading 1 form the fraction. The
// structure follows the source design.
//
// Choices of this design, where the source design says nothing: the
// fraction is truncated (round toward zero); an operand with exponent 0 is
// taken as zero (subnormals flush to zero) and gives a zero of sign
// sa^sb; a result exponent below 1 gives a zero of that sign and sets
// underflow; a result exponent of 2^EXP_W-1 or more gives an infinity of
// that sign and sets overflow; an infinite operand (all-ones exponent)
// gives an infinity of sign sa^sb without a flag, unless the other operand
// is zero, which wins; NaN is never produced. The exponent adders work modulo 2^EXP_W, as
// they produce no carry out, so the range check is made separately on a
// wider sum.
//
// Purely combinational.
module fp_multiplier #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y,
  output logic                 overflow,
  output logic                 underflow
);

  localparam int unsigned P        = MAN_W + 1;                   // significand width
  localparam int unsigned BIAS     = fp_pkg::fp_bias(EXP_W);
  localparam logic [EXP_W-1:0] NEG_BIAS = EXP_W'((1 << EXP_W) - BIAS);
  localparam logic [EXP_W-1:0] EXP_MAX  = '1;

  logic             sa, sb, sy;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;
  logic             zero_in, inf_in;

  assign {sa, ea, ma} = a;
  assign {sb, eb, mb} = b;
  assign sy       = sa ^ sb;
  assign zero_in  = (ea == '0) || (eb == '0);
  assign inf_in   = (ea == EXP_MAX) || (eb == EXP_MAX);

  // Significand product and normalisation.
  logic [2*P-1:0]   prod;
  logic             ne;
  logic [MAN_W-1:0] man_n;

  partition_multiplier #(.W(P), .GROUPS(4)) u_sig (
    .a({1'b1, ma}), .b({1'b1, mb}), .p(prod)
  );

  assign ne    = prod[2*P-1];
  assign man_n = ne ? prod[2*P-2 -: MAN_W] : prod[2*P-3 -: MAN_W];

  // Exponent: (ea + eb) - BIAS + NE, modulo 2^EXP_W.
  logic [EXP_W-1:0] e_sum, e_unb, e_res;

  csa_adder #(.W(EXP_W)) u_exp_add (.x(ea),    .y(eb),            .cin(1'b0), .s(e_sum));
  csa_adder #(.W(EXP_W)) u_exp_bias (.x(e_sum), .y(NEG_BIAS),      .cin(1'b0), .s(e_unb));
  csa_adder #(.W(EXP_W)) u_exp_norm (.x(e_unb), .y(EXP_W'(ne)),    .cin(1'b0), .s(e_res));

  // Range of the true exponent, two bits wider and signed.
  logic signed [EXP_W+2:0] e_true;
  assign e_true = $signed({3'b000, ea}) + $signed({3'b000, eb})
                - $signed((EXP_W+3)'(BIAS)) + $signed({{(EXP_W+2){1'b0}}, ne});

  logic ovf, unf;
  assign ovf = e_true >= $signed({3'b000, EXP_MAX});
  assign unf = e_true <= 0;

  always_comb begin
    if (zero_in)  y = {sy, {EXP_W{1'b0}}, {MAN_W{1'b0}}};
    else if (inf_in) y = {sy, EXP_MAX,     {MAN_W{1'b0}}};
    else if (ovf) y = {sy, EXP_MAX,        {MAN_W{1'b0}}};
    else if (unf) y = {sy, {EXP_W{1'b0}}, {MAN_W{1'b0}}};
    else          y = {sy, e_res,          man_n};
  end

  assign overflow  = !zero_in && !inf_in && ovf;
  assign underflow = !zero_in && !inf_in && unf;

endmodule
