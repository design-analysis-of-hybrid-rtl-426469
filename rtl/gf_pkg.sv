// gf_pkg: field constants and the shift-and-reduce step shared by the
// hybrid field-size GF(2^m) multiplier.
//
// The multiplier supports two binary fields at once: a small field GF(2^M1)
// defined by a trinomial and a large field GF(2^M2) defined by a pentanomial.
// Elements are held in M2-bit polynomial basis vectors (bit i = coefficient
// of x^i); in the small field the bits above M1-1 are always zero.
// The two field sizes and polynomials are this design's choice (the NIST
// binary-field polynomials for m = 233 and m = 283); only the pairing of a
// trinomial field with a pentanomial field comes from the source design.
package gf_pkg;

  localparam int unsigned M1 = 233;            // small field degree (trinomial)
  localparam int unsigned M2 = 283;            // large field degree (pentanomial)

  typedef logic [M2-1:0] elem_t;

  // Field-select encoding of the mode input.
  typedef enum logic {FIELD_TRI = 1'b0, FIELD_PENTA = 1'b1} field_e;

  // Low-order terms of the field polynomials (f(x) minus its leading term).
  // f1(x) = x^233 + x^74 + 1, f2(x) = x^283 + x^12 + x^7 + x^5 + 1.
  localparam elem_t F1_LOW = (elem_t'(1) << 74) | elem_t'(1);
  localparam elem_t F2_LOW = (elem_t'(1) << 12) | (elem_t'(1) << 7) |
                             (elem_t'(1) << 5)  | elem_t'(1);
  localparam elem_t M1_MASK = (elem_t'(1) << M1) - elem_t'(1);

  // a * x mod f(x) in the selected field.
  function automatic elem_t mulx(elem_t a, field_e fsel);
    elem_t r;
    if (fsel == FIELD_PENTA) begin
      r = a << 1;
      if (a[M2-1]) r = r ^ F2_LOW;
    end else begin
      r = (a << 1) & M1_MASK;
      if (a[M1-1]) r = r ^ F1_LOW;
    end
    return r;
  endfunction

  // a * x^n mod f(x): n shift-and-reduce steps (a constant XOR network).
  function automatic elem_t mulx_n(elem_t a, field_e fsel, int unsigned n);
    elem_t r = a;
    for (int unsigned i = 0; i < n; i++) r = mulx(r, fsel);
    return r;
  endfunction

endpackage
