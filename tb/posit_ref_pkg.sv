// posit_ref_pkg: reference model for the posit testbenches. It decodes a
// posit<n,es> bit pattern to a real number by walking its bits one at a time
// (sign, regime run, exponent bits, fraction), independently of the RTL
// converters, and reports how many exponent bits the pattern really holds.
package posit_ref_pkg;
  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // binary32 bits of a real (truncating extra mantissa bits; normal range only)
  function automatic logic [31:0] real_to_f32(real r);
    logic [63:0] d = $realtobits(r);
    int e;
    if (r == 0.0) return {d[63], 31'b0};
    e = int'(d[62:52]) - 1023 + 127;
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // value of a posit; exp_bits returns the number of exponent bits present
  function automatic real posit_value(int n, int es, int unsigned bits, output int exp_bits);
    int unsigned m;
    int i, k, e, run;
    bit lead;
    real frac, w;
    bit neg;
    exp_bits = es;
    bits = bits & ((1 << n) - 1);
    if (bits == 0) return 0.0;
    neg = (bits >> (n - 1)) & 1;
    m = neg ? (((~bits) + 1) & ((1 << n) - 1)) : bits;
    i = n - 2;
    lead = (m >> i) & 1;
    run = 0;
    while (i >= 0 && (((m >> i) & 1) == lead)) begin run++; i--; end
    i--;                                   // skip the terminating bit
    k = lead ? run - 1 : -run;
    e = 0;
    exp_bits = 0;
    for (int j = 0; j < es; j++) begin
      e = e << 1;
      if (i >= 0) begin e = e | ((m >> i) & 1); i--; exp_bits++; end
    end
    frac = 1.0;
    w = 0.5;
    while (i >= 0) begin
      if ((m >> i) & 1) frac = frac + w;
      w = w / 2.0;
      i--;
    end
    return (neg ? -1.0 : 1.0) * pow2(k * (1 << es) + e) * frac;
  endfunction
endpackage
