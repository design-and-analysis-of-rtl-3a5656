// fp_ref_pkg: reference arithmetic for the floating point testbenches.
//
// The functions work on any format up to 64 bits, given its exponent width
// ew and fraction width mw at run time, and compute results exactly with
// wide integers before truncating: the exact product or sum is formed as an
// integer magnitude, its leading 1 is found, and the fraction bits below it
// are kept (round toward zero). They follow the number conventions of the
// design (exponent 0 reads as zero, a zero sum gives +0, a result exponent
// below 1 gives a signed zero with underflow, 2^ew-1 or above a signed
// infinity with overflow, an infinite operand gives an infinity without a
// flag, a zero operand of a product wins over an infinite one) but none of its internal structure.
package fp_ref_pkg;

  typedef logic [63:0] fpw_t;
  localparam int XW = 2304;   // exact sum of any two double precision values
  typedef logic [XW-1:0] wide_t;

  function automatic int bias_of(input int ew);
    return (1 << (ew - 1)) - 1;
  endfunction

  function automatic fpw_t pack(input bit s, input int e, input fpw_t f, input int ew, input int mw);
    fpw_t r;
    r = f & ((64'd1 << mw) - 64'd1);
    r = r | (fpw_t'(e) << mw);
    r = r | (fpw_t'(s) << (ew + mw));
    return r;
  endfunction

  function automatic bit sign_of(input fpw_t v, input int ew, input int mw);
    return v[ew + mw];
  endfunction

  function automatic int exp_of(input fpw_t v, input int ew, input int mw);
    return int'((v >> mw) & ((64'd1 << ew) - 64'd1));
  endfunction

  function automatic fpw_t frac_of(input fpw_t v, input int mw);
    return v & ((64'd1 << mw) - 64'd1);
  endfunction

  // Significand with hidden bit, 0 for a zero (exponent 0).
  function automatic wide_t sig_of(input fpw_t v, input int ew, input int mw);
    if (exp_of(v, ew, mw) == 0) return '0;
    return wide_t'(frac_of(v, mw)) | (wide_t'(1) << mw);
  endfunction

  // Value = mag * 2^(e_base - bias - fbits). Truncate to the format.
  function automatic fpw_t from_exact(input bit s, input wide_t mag, input int e_base,
                                      input int fbits, input int ew, input int mw,
                                      output bit ovf, output bit unf);
    int   lead;
    int   e;
    wide_t f;
    ovf = 0;
    unf = 0;
    if (mag == '0) return '0;
    lead = 0;
    for (int i = 0; i < XW; i++) if (mag[i]) lead = i;
    e = e_base + lead - fbits;
    if (lead >= mw) f = mag >> (lead - mw);
    else            f = mag << (mw - lead);
    if (e >= (1 << ew) - 1) begin
      ovf = 1;
      return pack(s, (1 << ew) - 1, '0, ew, mw);
    end
    if (e <= 0) begin
      unf = 1;
      return pack(s, 0, '0, ew, mw);
    end
    return pack(s, e, fpw_t'(f), ew, mw);
  endfunction

  function automatic fpw_t ref_mul(input fpw_t a, input fpw_t b, input int ew, input int mw,
                                   output bit ovf, output bit unf);
    bit s;
    s = sign_of(a, ew, mw) ^ sign_of(b, ew, mw);
    ovf = 0;
    unf = 0;
    if (exp_of(a, ew, mw) == 0 || exp_of(b, ew, mw) == 0) return pack(s, 0, '0, ew, mw);
    if (exp_of(a, ew, mw) == (1 << ew) - 1 || exp_of(b, ew, mw) == (1 << ew) - 1)
      return pack(s, (1 << ew) - 1, '0, ew, mw);
    return from_exact(s, sig_of(a, ew, mw) * sig_of(b, ew, mw),
                      exp_of(a, ew, mw) + exp_of(b, ew, mw) - bias_of(ew), 2 * mw,
                      ew, mw, ovf, unf);
  endfunction

  function automatic fpw_t ref_add(input fpw_t a, input fpw_t b, input int ew, input int mw,
                                   output bit ovf, output bit unf);
    int    ea, eb, e0;
    wide_t ma, mb, m;
    bit    sa, sb, s;
    ea = exp_of(a, ew, mw);
    eb = exp_of(b, ew, mw);
    sa = sign_of(a, ew, mw);
    sb = sign_of(b, ew, mw);
    ovf = 0;
    unf = 0;
    // An infinity wins, with the sign of the operand of larger magnitude.
    if (ea == (1 << ew) - 1 || eb == (1 << ew) - 1) begin
      if (eb > ea || (eb == ea && frac_of(b, mw) > frac_of(a, mw)))
        return pack(sb, (1 << ew) - 1, '0, ew, mw);
      return pack(sa, (1 << ew) - 1, '0, ew, mw);
    end
    if (ea == 0) e0 = eb;
    else if (eb == 0) e0 = ea;
    else e0 = (ea < eb) ? ea : eb;
    ma = (ea == 0) ? '0 : sig_of(a, ew, mw) << (ea - e0);
    mb = (eb == 0) ? '0 : sig_of(b, ew, mw) << (eb - e0);
    if (sa == sb) begin
      m = ma + mb;
      s = sa;
    end else if (ma >= mb) begin
      m = ma - mb;
      s = sa;
    end else begin
      m = mb - ma;
      s = sb;
    end
    return from_exact(s, m, e0, mw, ew, mw, ovf, unf);
  endfunction

  // Random normalised value with exponent within +-spread of the bias.
  function automatic fpw_t rand_fp(input int ew, input int mw, input int spread);
    fpw_t f;
    int   e;
    f = {$urandom, $urandom};
    e = bias_of(ew) + int'($urandom % (2 * spread + 1)) - spread;
    return pack(1'($urandom), e, f, ew, mw);
  endfunction

endpackage
