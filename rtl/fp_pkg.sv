// fp_pkg: format constants shared by the floating point matrix multiplier.
//
// The design handles the two IEEE-754 binary interchange formats:
// single precision (1 sign bit, 8 exponent bits, 23 fraction bits, bias 127)
// and double precision (1 sign bit, 11 exponent bits, 52 fraction bits,
// bias 1023). Modules take the exponent and fraction widths as parameters;
// the constants below are the values used for the two formats, and
// fp_bias() derives the bias from the exponent width (2^(E-1) - 1).
package fp_pkg;

  localparam int unsigned SP_EXP_W = 8;
  localparam int unsigned SP_MAN_W = 23;
  localparam int unsigned DP_EXP_W = 11;
  localparam int unsigned DP_MAN_W = 52;

  // Single and double precision words, sign | biased exponent | fraction.
  typedef struct packed {
    logic                sign;
    logic [SP_EXP_W-1:0] exp;
    logic [SP_MAN_W-1:0] man;
  } sp_t;

  typedef struct packed {
    logic                sign;
    logic [DP_EXP_W-1:0] exp;
    logic [DP_MAN_W-1:0] man;
  } dp_t;

  function automatic int unsigned fp_bias(input int unsigned exp_w);
    return (32'd1 << (exp_w - 1)) - 32'd1;
  endfunction

endpackage
