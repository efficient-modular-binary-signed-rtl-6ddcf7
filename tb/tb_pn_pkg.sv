// tb_pn_pkg: reference arithmetic for the Pos-Neg BSD testbenches, written independently of
// the RTL.
//
// A residue of n Pos-Neg digits is handled here as a plain bit vector, digit i in bits
// [2i+1:2i] with the posibit in the upper bit, which is how a packed array of posneg_pkg's
// digit struct lies in memory. pn_value turns such a vector into its integer value
// sum (p_i + q_i - 1) * 2^i. pn_encode makes a random redundant encoding of an integer: at each
// position an odd remainder gets a digit of +1 or -1 picked at random among those that leave
// the rest representable, and every zero digit gets one of its two encodings at random.
package tb_pn_pkg;

  localparam int MAXN = 32;
  typedef logic [2*MAXN-1:0] pnvec_t;

  // Modulus of kind 0: 2^n-1, kind 1: 2^n, kind 2: 2^n+1.
  function automatic longint modulus(input int kind, input int n);
    longint p2;
    p2 = longint'(1) << n;
    return (kind == 0) ? p2 - 1 : (kind == 1) ? p2 : p2 + 1;
  endfunction

  function automatic longint pn_value(input pnvec_t v, input int n);
    longint acc;
    acc = 0;
    for (int i = 0; i < n; i++)
      acc += (longint'(v[2*i+1]) + longint'(v[2*i]) - 1) <<< i;
    return acc;
  endfunction

  // v reduced into [0, m).
  function automatic longint modp(input longint v, input longint m);
    longint r;
    r = v % m;
    if (r < 0) r += m;
    return r;
  endfunction

  function automatic pnvec_t pn_zero_digit_rand();
    pnvec_t d;
    d = '0;
    d[1:0] = ($urandom_range(1) != 0) ? 2'b01 : 2'b10;
    return d;
  endfunction

  // Random redundant encoding of v, |v| <= 2^n - 1.
  function automatic pnvec_t pn_encode(input longint v, input int n);
    pnvec_t res;
    longint rem, lim;
    longint d;
    res = '0;
    rem = v;
    for (int i = 0; i < n; i++) begin
      lim = (longint'(1) << (n - i - 1)) - 1;  // largest magnitude the upper digits can hold
      if ((rem & 1) == 0) begin
        d = 0;
      end else begin
        d = ($urandom_range(1) != 0) ? 1 : -1;
        if ((rem - d) / 2 > lim || (rem - d) / 2 < -lim) d = -d;
      end
      if (d == 0)       res[2*i +: 2] = pn_zero_digit_rand()[1:0];
      else if (d == 1)  res[2*i +: 2] = 2'b11;
      else              res[2*i +: 2] = 2'b00;
      rem = (rem - d) / 2;
    end
    return res;
  endfunction

  // Any n-digit vector: each digit bit pair is random.
  function automatic pnvec_t pn_random(input int n);
    pnvec_t res;
    res = '0;
    for (int i = 0; i < n; i++) res[2*i +: 2] = 2'($urandom_range(3));
    return res;
  endfunction

  // A representative of residue r (0 <= r < m) that n digits can hold, r or r - m, picked at
  // random when both fit.
  function automatic longint residue_repr(input longint r, input longint m, input int n);
    longint lim;
    lim = (longint'(1) << n) - 1;
    if (r > lim) return r - m;
    if (r - m >= -lim && $urandom_range(1) != 0) return r - m;
    return r;
  endfunction

endpackage
