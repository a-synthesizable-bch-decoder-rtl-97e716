// tb_gf_pkg: reference Galois-field arithmetic for the testbenches.
//
// Written separately from the RTL package: bit-serial multiplication
// LSB-first with the primitive polynomials x^16+x^5+x^3+x^2+1 (normal
// frames) and x^14+x^5+x^3+x+1 (short frames), powers of alpha by repeated
// multiplication, and polynomial evaluation by Horner's rule.
package tb_gf_pkg;

  function automatic int unsigned ref_m(bit sf);
    return sf ? 14 : 16;
  endfunction

  function automatic int unsigned ref_q(bit sf);
    return sf ? 16383 : 65535;
  endfunction

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b, bit sf);
    logic [16:0] aa = {1'b0, a};
    logic [15:0] r = '0;
    int unsigned m = ref_m(sf);
    logic [16:0] p = sf ? 17'h0402b : 17'h1002d;
    for (int i = 0; i < 16; i++) begin
      if (b[i]) r ^= aa[15:0];
      aa = aa << 1;
      if (aa[m]) aa ^= p;
    end
    return r;
  endfunction

  function automatic logic [15:0] ref_pow(longint e, bit sf);
    logic [15:0] r = 16'h1;
    logic [15:0] base = 16'h2;
    longint q = longint'(ref_q(sf));
    longint x = e % q;
    if (x < 0) x += q;
    while (x > 0) begin
      if (x[0]) r = ref_mul(r, base, sf);
      base = ref_mul(base, base, sf);
      x = x >> 1;
    end
    return r;
  endfunction

  // Standard code table: k, n, t of a configuration.
  function automatic void ref_code(input bit sf, input int cr,
                                   output int k, output int n, output int t);
    int kn [11] = '{16008, 21408, 25728, 32208, 38688, 43040, 48408, 51648, 53840, 57472, 58192};
    int tn [11] = '{12, 12, 12, 12, 12, 10, 12, 12, 10, 8, 8};
    int ks [10] = '{3072, 5232, 6312, 7032, 9552, 10632, 11712, 12432, 13152, 14232};
    if (!sf) begin k = kn[cr]; t = tn[cr]; n = k + 16 * t; end
    else     begin k = ks[cr]; t = 12;     n = k + 14 * t; end
  endfunction

endpackage
