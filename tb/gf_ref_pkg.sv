// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. GF(2^128) multiplication is done bit-serially (shift-and-add,
// reducing by x^128 = x^7 + x^2 + x + 1 at every shift), and the three hashes
// are evaluated by plain Horner's rule over all blocks, without branches.
package gf_ref_pkg;

  typedef logic [127:0] b128_t;

  function automatic b128_t ref_xtime(input b128_t z);
    b128_t r;
    r = z << 1;
    if (z[127]) r = r ^ 128'h87;
    return r;
  endfunction

  function automatic b128_t ref_mul(input b128_t a, input b128_t b);
    b128_t z;
    z = '0;
    for (int i = 127; i >= 0; i--) begin
      z = ref_xtime(z);
      if (b[i]) z = z ^ a;
    end
    return z;
  endfunction

  function automatic b128_t ref_pow(input b128_t a, input int unsigned e);
    b128_t z;
    z = 128'd1;
    for (int unsigned i = 0; i < e; i++) z = ref_mul(z, a);
    return z;
  endfunction

  function automatic b128_t rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // mode: 0 HCH, 1 HCTR, 2 XCB
  //   HCH : qt + sum m_j K^(pi-j)
  //   HCTR: sum m_j K^(pi-j+2) + x0 K
  //   XCB : sum m_j K^(pi-j+3) + x0 K^2 + x1 K
  function automatic b128_t ref_hash(input int mode, input b128_t key, input b128_t qt,
                                     input b128_t x0, input b128_t x1, input b128_t m[]);
    b128_t acc;
    acc = '0;
    foreach (m[j]) acc = ref_mul(acc, key) ^ m[j];
    if (mode == 0) begin
      acc = acc ^ qt;
    end else if (mode == 1) begin
      acc = ref_mul(acc, key) ^ x0;
      acc = ref_mul(acc, key);
    end else begin
      acc = ref_mul(acc, key) ^ x0;
      acc = ref_mul(acc, key) ^ x1;
      acc = ref_mul(acc, key);
    end
    return acc;
  endfunction

endpackage
