// hsm_pkg: elaboration-time geometry of the byte-partitioned multiplier.
//
// An N-bit 2's-complement operand (sign plus N-1 fraction bits) is cut into
// L bytes: the L-1 low bytes hold M-1 bits each and are fed to an M x M
// multiplier with a forced-positive sign bit; the top byte holds the
// remaining B bits (B <= M) including the sign. The L*L byte products
// ("summands") are numbered s = i*L + j for X byte i and Y byte j and sit at
// bit offset (M-1)*(i+j) in the (2N-1)-bit product.
//
// Summand widths follow the partition: a low x low product is 2(M-1) bits and
// unsigned; a top x low product is B+M-1 bits and signed; the top x top
// product is 2B-1 bits and signed. Signed summands are sign-extended up to the
// product's top bit, unsigned ones simply end. The functions below count how
// many summand bits land in each column and pick the column counter: a single
// bit passes straight through (type 1), otherwise a (3,2), (5,2) or (7,2)
// counter is used. The counter type never falls from one column to the next,
// so a column always has enough carry inputs for the carry outputs of the
// column below it. The partition and widths are those of the design; the
// monotone counter choice is this implementation's rule.
package hsm_pkg;

  // Number of bytes L per operand.
  function automatic int nbytes(int n, int m);
    return (n - 1 + m - 2) / (m - 1);
  endfunction

  // Length B of the most significant byte (sign included).
  function automatic int top_len(int n, int m);
    return n - (m - 1) * (nbytes(n, m) - 1);
  endfunction

  // Width of the full product: sign plus 2(N-1) value bits.
  function automatic int prod_w(int n);
    return 2 * n - 1;
  endfunction

  function automatic int s_shift(int n, int m, int s);
    int l = nbytes(n, m);
    return (m - 1) * (s / l + s % l);
  endfunction

  function automatic int s_width(int n, int m, int s);
    int l = nbytes(n, m);
    int b = top_len(n, m);
    int tops = ((s / l) == l - 1 ? 1 : 0) + ((s % l) == l - 1 ? 1 : 0);
    if (tops == 2) return 2 * b - 1;
    if (tops == 1) return b + m - 1;
    return 2 * (m - 1);
  endfunction

  function automatic bit s_signed(int n, int m, int s);
    int l = nbytes(n, m);
    return ((s / l) == l - 1) || ((s % l) == l - 1);
  endfunction

  // Does summand s put a bit (value or sign extension) into column c?
  function automatic bit s_present(int n, int m, int s, int c);
    int sh = s_shift(n, m, s);
    if (c < sh) return 1'b0;
    if (c < sh + s_width(n, m, s)) return 1'b1;
    return s_signed(n, m, s);
  endfunction

  // Bit of the raw byte product that summand s contributes to column c.
  function automatic int s_bit(int n, int m, int s, int c);
    int off = c - s_shift(n, m, s);
    int w = s_width(n, m, s);
    return (off < w) ? off : w - 1;
  endfunction

  function automatic int col_count(int n, int m, int c);
    int l = nbytes(n, m);
    int cnt = 0;
    for (int s = 0; s < l * l; s++) if (s_present(n, m, s, c)) cnt++;
    return cnt;
  endfunction

  // Index of the k-th summand present in column c, or -1.
  function automatic int col_summand(int n, int m, int c, int k);
    int l = nbytes(n, m);
    int cnt = 0;
    for (int s = 0; s < l * l; s++) begin
      if (s_present(n, m, s, c)) begin
        if (cnt == k) return s;
        cnt++;
      end
    end
    return -1;
  endfunction

  // Largest column height over the product; the design needs it <= 7.
  function automatic int max_count(int n, int m);
    int mx = 0;
    for (int c = 0; c < prod_w(n); c++)
      if (col_count(n, m, c) > mx) mx = col_count(n, m, c);
    return mx;
  endfunction

  // Counter used in column c: 1 (wire), 3, 5 or 7 inputs.
  function automatic int col_type(int n, int m, int c);
    int t = 1;
    for (int k = 0; k <= c; k++) begin
      int cnt = col_count(n, m, k);
      int need = (cnt <= 1) ? 1 : (cnt <= 3) ? 3 : (cnt <= 5) ? 5 : 7;
      if (need > t) t = need;
    end
    return t;
  endfunction

  // Number of carry outputs of a counter of type t.
  function automatic int n_carry(int t);
    return (t == 7) ? 4 : (t == 5) ? 2 : 0;
  endfunction

endpackage
