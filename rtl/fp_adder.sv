// fp_adder: IEEE-754 binary floating point adder, y = a + b, for operands
// of EXP_W exponent bits and MAN_W fraction bits.
//
// The operand of larger magnitude is taken as the reference. The other
// significand (hidden 1 included) is extended by guard, round and sticky
// bits and shifted right by the exponent difference; every bit shifted past
// the round position is ORed into the sticky bit. The two extended
// significands are added, or subtracted when the signs differ, and the
// result is normalised: a carry out shifts it right by one and raises the
// exponent, a cancellation shifts it left until its leading 1 is back at
// the hidden-bit position and lowers the exponent by the shift. The
// fraction is then truncated below the hidden bit, which with the sticky
// bit gives exactly the round-toward-zero value of the true sum.
//
// The source design names this adder only as the unit that sums the
// partial products of the matrix multiplier; everything here is this
// design's own choice, kept as simple as an IEEE-style adder allows, and
// matched to the multiplier: truncation, exponent 0 read as zero, a zero
// sum gives +0, a result exponent below 1 gives a signed zero and sets
// underflow, a result exponent of 2^EXP_W-1 or more gives a signed infinity
// and sets overflow. An infinity (all-ones exponent) passes through with
// the sign of the larger operand and no flag, so an overflow found by a
// multiplier survives the column sum; NaN is never produced (inf - inf
// gives an infinity) and a NaN operand is read as an infinity.
//
// Purely combinational.
module fp_adder #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y,
  output logic                 overflow,
  output logic                 underflow
);

  localparam int unsigned P   = MAN_W + 1;    // significand with hidden bit
  localparam int unsigned EXT = P + 3;        // plus guard, round, sticky
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  logic             sa, sb, za, zb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb, ma_z, mb_z;

  assign {sa, ea, ma} = a;
  assign {sb, eb, mb} = b;
  assign za   = (ea == '0);
  assign zb   = (eb == '0);
  assign ma_z = za ? '0 : ma;
  assign mb_z = zb ? '0 : mb;

  // Order the operands by magnitude.
  logic             swap;
  logic             s_l, s_s;
  logic [EXP_W-1:0] e_l, e_s, d;
  logic [P-1:0]     sig_l, sig_s;

  assign swap  = {eb, mb_z} > {ea, ma_z};
  assign s_l   = swap ? sb : sa;
  assign s_s   = swap ? sa : sb;
  assign e_l   = swap ? eb : ea;
  assign e_s   = swap ? ea : eb;
  assign sig_l = swap ? {!zb, mb_z} : {!za, ma_z};
  assign sig_s = swap ? {!za, ma_z} : {!zb, mb_z};
  assign d     = e_l - e_s;

  // Alignment with sticky bit.
  logic [EXT-1:0] x_l, x_s0, x_s;
  logic           sticky;

  assign x_l  = {sig_l, 3'b000};
  assign x_s0 = {sig_s, 3'b000};

  always_comb begin
    if (d >= EXP_W'(EXT)) begin
      x_s    = '0;
      sticky = |sig_s;
    end else begin
      x_s    = x_s0 >> d;
      sticky = |(x_s0 & ((EXT'(1) << d) - EXT'(1)));
    end
    x_s[0] = x_s[0] | sticky;
  end

  // Add or subtract (x_l >= x_s, so the difference is never negative).
  logic [EXT:0] r;
  assign r = (s_l ^ s_s) ? {1'b0, x_l} - {1'b0, x_s} : {1'b0, x_l} + {1'b0, x_s};

  // Normalisation.
  logic [EXT-1:0]          norm;
  logic signed [EXP_W+1:0] e_new;
  int unsigned             lead;

  always_comb begin
    lead = 0;
    for (int unsigned i = 0; i < EXT; i++)
      if (r[i]) lead = i;
    if (r[EXT]) begin
      norm  = r[EXT:1];
      e_new = $signed({2'b00, e_l}) + 1;
    end else begin
      norm  = r[EXT-1:0] << (EXT - 1 - lead);
      e_new = $signed({2'b00, e_l}) - $signed((EXP_W+2)'(EXT - 1 - lead));
    end
  end

  logic inf_l, zero_sum, ovf, unf;
  assign inf_l    = (e_l == EXP_MAX);
  assign zero_sum = (r == '0);
  assign ovf      = !inf_l && !zero_sum && e_new >= $signed({2'b00, EXP_MAX});
  assign unf      = !inf_l && !zero_sum && e_new <= 0;

  always_comb begin
    if (inf_l)         y = {s_l, EXP_MAX, {MAN_W{1'b0}}};
    else if (zero_sum) y = '0;
    else if (ovf) y = {s_l, EXP_MAX,        {MAN_W{1'b0}}};
    else if (unf) y = {s_l, {EXP_W{1'b0}}, {MAN_W{1'b0}}};
    else          y = {s_l, e_new[EXP_W-1:0], norm[EXT-2 -: MAN_W]};
  end

  assign overflow  = ovf;
  assign underflow = unf;

  logic unused_norm;
  assign unused_norm = ^{norm[EXT-1], norm[2:0]};

endmodule
