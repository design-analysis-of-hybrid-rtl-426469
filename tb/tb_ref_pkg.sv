// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL. GF(2^m) products are formed as a full carry-less product of
// degree < 2m followed by polynomial long division by the whole field
// polynomial f(x) (given here by its exponent list).
package tb_ref_pkg;

  localparam int unsigned RM1 = 233;
  localparam int unsigned RM2 = 283;
  localparam int unsigned RW  = 2 * RM2;

  typedef logic [RM2-1:0] relem_t;
  typedef logic [RW-1:0]  rwide_t;

  // f(x) as a wide vector: mode 0 -> x^233+x^74+1, mode 1 -> x^283+x^12+x^7+x^5+1
  function automatic rwide_t field_poly(bit mode);
    rwide_t f = '0;
    if (mode) begin
      f[283] = 1'b1; f[12] = 1'b1; f[7] = 1'b1; f[5] = 1'b1; f[0] = 1'b1;
    end else begin
      f[233] = 1'b1; f[74] = 1'b1; f[0] = 1'b1;
    end
    return f;
  endfunction

  function automatic int unsigned degree(bit mode);
    return mode ? RM2 : RM1;
  endfunction

  // v mod f(x) by long division from the top bit down.
  function automatic relem_t reduce(rwide_t v, bit mode);
    rwide_t f = field_poly(mode);
    int unsigned m = degree(mode);
    for (int i = RW - 1; i >= int'(m); i--)
      if (v[i]) v = v ^ (f << (i - int'(m)));
    return relem_t'(v);
  endfunction

  function automatic relem_t gf_mul(relem_t a, relem_t b, bit mode);
    rwide_t prod = '0;
    for (int i = 0; i < int'(RM2); i++)
      if (b[i]) prod = prod ^ (rwide_t'(a) << i);
    return reduce(prod, mode);
  endfunction

  // x^n mod f(x), n < 2m
  function automatic relem_t xpow(int unsigned n, bit mode);
    rwide_t v = '0;
    v[n] = 1'b1;
    return reduce(v, mode);
  endfunction

  function automatic relem_t rand_elem(bit mode);
    relem_t r;
    for (int i = 0; i < int'(RM2); i += 32) r[i +: 32] = $urandom;
    if (!mode) r = r & ((relem_t'(1) << RM1) - 1);
    return r;
  endfunction

endpackage
