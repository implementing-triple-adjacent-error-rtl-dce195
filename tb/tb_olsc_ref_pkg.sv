// tb_olsc_ref_pkg - reference model of the DEC OLS code for the testbenches,
// written independently of the RTL package.
//
// Vectors are held in fixed 512-bit containers (enough for M up to 16:
// 256 data bits + 64 check bits). Data bit i has row a = i / m and column
// b = i % m. Check groups, each of m checks: rows, columns, a xor b, and
// (2a) xor b with 2a computed by a shift and conditional reduction in GF(m).
// Storage order: check j sits at position 4m-1-j, data bit i at 4m+i.
package tb_olsc_ref_pkg;

  typedef logic [511:0] vec_t;

  // 2*a in GF(m): shift left, reduce by the field polynomial on overflow.
  function automatic int xtime(input int a, input int m);
    int r;
    r = a * 2;
    if (r >= m) begin
      if (m == 4)       r = r ^ 7;
      else if (m == 8)  r = r ^ 11;
      else if (m == 16) r = r ^ 19;
      else              r = r ^ 37;
    end
    return r;
  endfunction

  // Does data bit i participate in check j?
  function automatic bit in_check(input int m, input int i, input int j);
    int a, b, grp, v;
    a   = i / m;
    b   = i % m;
    grp = j / m;
    v   = j % m;
    case (grp)
      0:       return a == v;
      1:       return b == v;
      2:       return (a ^ b) == v;
      default: return (xtime(a, m) ^ b) == v;
    endcase
  endfunction

  function automatic int pos_data(input int m, input int i);
    return 4 * m + i;
  endfunction

  function automatic int pos_check(input int m, input int j);
    return 4 * m - 1 - j;
  endfunction

  // Check bits (bit j = check j) of a data word.
  function automatic vec_t ref_checks(input int m, input vec_t d);
    vec_t c;
    c = '0;
    for (int j = 0; j < 4 * m; j++)
      for (int i = 0; i < m * m; i++)
        if (in_check(m, i, j) && d[i]) c[j] = ~c[j];
    return c;
  endfunction

  // Codeword in storage order.
  function automatic vec_t encode(input int m, input vec_t d);
    vec_t c, w;
    c = ref_checks(m, d);
    w = '0;
    for (int i = 0; i < m * m; i++) w[pos_data(m, i)] = d[i];
    for (int j = 0; j < 4 * m; j++) w[pos_check(m, j)] = c[j];
    return w;
  endfunction

  // Syndrome of a (possibly corrupted) codeword.
  function automatic vec_t syndrome(input int m, input vec_t w);
    vec_t d, c, s;
    d = '0;
    for (int i = 0; i < m * m; i++) d[i] = w[pos_data(m, i)];
    c = ref_checks(m, d);
    s = '0;
    for (int j = 0; j < 4 * m; j++) s[j] = c[j] ^ w[pos_check(m, j)];
    return s;
  endfunction

  function automatic vec_t data_of(input int m, input vec_t w);
    vec_t d;
    d = '0;
    for (int i = 0; i < m * m; i++) d[i] = w[pos_data(m, i)];
    return d;
  endfunction

  function automatic vec_t rand_vec();
    vec_t v;
    for (int w = 0; w < 16; w++) v[w*32 +: 32] = $urandom();
    return v;
  endfunction

  function automatic vec_t mask(input int bits);
    vec_t v;
    v = '0;
    for (int i = 0; i < bits; i++) v[i] = 1'b1;
    return v;
  endfunction

endpackage
