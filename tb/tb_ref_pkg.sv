// tb_ref_pkg: reference arithmetic for the multiplier testbenches, written
// independently of the RTL geometry package. Operands of up to 64 bits are
// held in 128-bit vectors; byte k of an n-bit operand cut for m x m
// multipliers is its k-th (m-1)-bit field, unsigned, except the last, which
// takes all remaining bits as a signed number.
package tb_ref_pkg;

  function automatic int n_bytes(int n, int m);
    int l = 1;
    while (l * (m - 1) + 1 < n) l++;
    return l;
  endfunction

  function automatic longint byte_val(int n, int m, logic [127:0] v, int k);
    int l = n_bytes(n, m);
    int lsb = (m - 1) * k;
    int len = (k == l - 1) ? n - lsb : m - 1;
    logic [127:0] f = (v >> lsb) & ((128'd1 << len) - 1);
    if (k == l - 1 && f[len-1]) f = f - (128'd1 << len);   // negative top byte
    return longint'(f);
  endfunction

  // Signed n-bit value of v, as a 128-bit 2's-complement vector.
  function automatic logic [127:0] sext(int n, logic [127:0] v);
    logic [127:0] f = v & ((128'd1 << n) - 1);
    if (f[n-1]) f = f - (128'd1 << n);
    return f;
  endfunction

  // x*y modulo 2^(2n-1), the multiplier's result.
  function automatic logic [127:0] prod_ref(int n, logic [127:0] x, logic [127:0] y);
    logic [127:0] p = sext(n, x) * sext(n, y);
    return p & ((128'd1 << (2 * n - 1)) - 1);
  endfunction

  // Random n-bit operand; one in four is a corner value.
  function automatic logic [127:0] rand_op(int n);
    logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
    case ($urandom_range(0, 11))
      0: v = 0;
      1: v = 1;
      2: v = '1;                              // -1 (one lsb)
      3: v = 128'd1 << (n - 1);               // most negative: -1.0
      4: v = (128'd1 << (n - 1)) - 1;         // most positive
      5: v = v | (128'd1 << (n - 1));         // some negative value
      default: ;
    endcase
    return v & ((128'd1 << n) - 1);
  endfunction

endpackage
