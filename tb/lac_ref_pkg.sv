// Reference models for the testbenches, written independently of the RTL:
// schoolbook polynomial products modulo x^n -+ 1 over Z_q, GF(2^9)
// multiplication by carry-less product and long division by
// p(x) = 1 + x^4 + x^9, and integer helpers.
package lac_ref_pkg;

  localparam int REF_Q = 251;

  // Ternary value of a two-bit code: 01 -> +1, 11 -> -1, else 0
  function automatic int tern_val(logic [1:0] t);
    if (t == 2'b01) return 1;
    if (t == 2'b11) return -1;
    return 0;
  endfunction

  // c = a * b mod (x^n - 1) for neg = 0, mod (x^n + 1) for neg = 1
  function automatic void poly_mul(input int n, input bit neg, input int a[], input int b[],
                                   output int c[]);
    c = new[n];
    foreach (c[i]) c[i] = 0;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) begin
        int k, s;
        k = i + j;
        s = a[i] * b[j];
        if (k >= n) begin
          k -= n;
          if (neg) s = -s;
        end
        c[k] = c[k] + s;
      end
    end
    foreach (c[i]) c[i] = ((c[i] % REF_Q) + REF_Q) % REF_Q;
  endfunction

  function automatic logic [8:0] gf_mul(logic [8:0] a, logic [8:0] b);
    logic [16:0] p;
    p = '0;
    for (int i = 0; i < 9; i++) if (b[i]) p ^= 17'(a) << i;
    for (int d = 16; d >= 9; d--) if (p[d]) p ^= (17'b1 << d) | (17'b1 << (d - 5)) | (17'b1 << (d - 9));
    return p[8:0];
  endfunction

endpackage
