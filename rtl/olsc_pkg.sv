// olsc_pkg - structure of a double-error-correcting Orthogonal Latin Squares
// (OLS) code with k = m*m data bits and 4m check bits.
//
// A data bit d(i) is placed on an m x m grid: row a = i / m, column b = i % m.
// Each data bit belongs to exactly one check of each of four groups of m
// checks (2t = 4 for t = 2):
//   group 0 (checks 0..m-1)     : its row a                  (matrix M1)
//   group 1 (checks m..2m-1)    : its column b               (matrix M2)
//   group 2 (checks 2m..3m-1)   : L1(a,b) = a xor b          (Latin square 1)
//   group 3 (checks 3m..4m-1)   : L2(a,b) = (2*a) xor b      (Latin square 2)
// Groups 0 and 1 follow the SEC construction H = [M1; M2 | I]. The two Latin
// squares of the DEC extension are this design's choice: L1 is the square
// printed for m = 4 (values minus one), L2 uses GF(m) multiplication, so all
// four groups are mutually orthogonal and any two data bits share at most one
// check. m must be a power of two from 4 to 32.
//
// Storage order (this design's choice): the codeword is a vector of
// n = k + 4m cells; data bit i sits at position 4m + i and check j at position
// 4m - 1 - j, so check 0 (the row check of d0..d(m-1)) is the cell next to d0
// and the checks run away from the data in index order. With this placement
// every burst of three adjacent cells, including bursts that straddle the
// data/check boundary or lie in the checks, leaves the data correctable.
//
// Everything here is constant functions used at elaboration time.
package olsc_pkg;

  // Number of random errors the code corrects and checks per data bit.
  localparam int unsigned T      = 2;
  localparam int unsigned GROUPS = 2 * T;

  // Primitive polynomial of GF(m) (bit s set), 0 when m is not supported.
  function automatic int unsigned gf_poly(input int unsigned m);
    case (m)
      4:       return 32'h07;   // x^2 + x + 1
      8:       return 32'h0B;   // x^3 + x + 1
      16:      return 32'h13;   // x^4 + x + 1
      32:      return 32'h25;   // x^5 + x^2 + 1
      default: return 32'h00;
    endcase
  endfunction

  // Multiply a and b in GF(m), m = 2^s.
  function automatic int unsigned gf_mul(input int unsigned a, input int unsigned b,
                                         input int unsigned m);
    int unsigned r;
    int unsigned s;
    r = 0;
    s = $clog2(m);
    for (int unsigned i = 0; i < s; i++)
      if (((b >> i) & 1) != 0) r = r ^ (a << i);
    for (int i = 2 * int'(s) - 2; i >= int'(s); i--)
      if (((r >> i) & 1) != 0) r = r ^ (gf_poly(m) << (i - int'(s)));
    return r;
  endfunction

  // Index (0 .. 4m-1) of the check of group g that data bit i belongs to.
  function automatic int unsigned chk_idx(input int unsigned m, input int unsigned i,
                                          input int unsigned g);
    int unsigned a;
    int unsigned b;
    a = i / m;
    b = i % m;
    case (g)
      0:       return a;
      1:       return m + b;
      2:       return 2 * m + (a ^ b);
      default: return 3 * m + (gf_mul(2, a, m) ^ b);
    endcase
  endfunction

  // Codeword positions of data bit i and check bit j.
  function automatic int unsigned data_pos(input int unsigned m, input int unsigned i);
    return 4 * m + i;
  endfunction

  function automatic int unsigned check_pos(input int unsigned m, input int unsigned j);
    return 4 * m - 1 - j;
  endfunction

  // Row (group-0 check) that a triple adjacent error on data bits j, j+1, j+2
  // sets: the row holding an odd number of the three bits.
  function automatic int unsigned tae_row(input int unsigned m, input int unsigned j);
    if (j % m == m - 2) return j / m + 1;   // one bit in the next row
    return j / m;                           // all three in row j/m, or two in the next row
  endfunction

endpackage
