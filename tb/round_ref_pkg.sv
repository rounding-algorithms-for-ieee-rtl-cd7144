// Reference models for the rounding testbenches.
//
// Everything here works on the exact integer product P = X*Y of two n-bit
// mantissas (value P * 2^-(2n-2)), computed with wide integer arithmetic and
// without any carry-save form, so the expected values are independent of the
// hardware structures under test. Operands and products are held in 128-bit
// vectors, which covers n up to 64.
package round_ref_pkg;
  import rnd_pkg::*;

  typedef logic [127:0] u128;

  function automatic u128 rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  function automatic u128 mask(int w);
    return (w >= 128) ? '1 : ((u128'(1) << w) - 1);
  endfunction

  // Normalized n-bit operand pair. kind 0: uniform, 1: with trailing zeros
  // (exact products and ties), 2: product just below 2 (rounding carries the
  // mantissa up to 2.0), 3: one operand all ones, 4: an exact tie with an
  // even L bit: x = 1 + 2^(k-n+1), y = 1 + 2^(j-n+1) with k + j = n-2.
  function automatic void gen_operands(int n, int kind, output u128 x, output u128 y);
    u128 t, p;
    x = (rand128() & mask(n)) | (u128'(1) << (n - 1));
    y = (rand128() & mask(n)) | (u128'(1) << (n - 1));
    case (kind)
      1: begin
        x = x & ~mask($urandom_range(n - 1, 0));
        y = y & ~mask($urandom_range(n - 1, 0));
      end
      2: begin
        t = (u128'(1) << (2 * n - 1)) - (u128'(1) << (n - 2));
        y = (t + x - 1) / x;
        p = x * y;
        if (y >= (u128'(1) << n) || p >= (u128'(1) << (2 * n - 1)))
          y = u128'(1) << (n - 1);
      end
      3: x = mask(n);
      4: begin
        int k;
        k = $urandom_range(n - 3, 1);
        x = (u128'(1) << (n - 1)) | (u128'(1) << k);
        y = (u128'(1) << (n - 1)) | (u128'(1) << (n - 2 - k));
      end
      default: ;
    endcase
  endfunction

  // What a rounding algorithm must output: round to nearest/up (rin = 1) or
  // truncation (rin = 0) of P to n bits, normalized to 1.f.
  function automatic void alg_ref(int n, u128 p, bit rin, output u128 mant, output bit exp_inc);
    bit v;
    int sh;
    u128 q;
    v  = p[2*n-1];
    sh = n - 1 + int'(v);
    q  = p >> sh;
    if (rin && p[sh-1]) q = q + 1;
    exp_inc = v;
    if (q[n]) begin
      q = q >> 1;
      exp_inc = 1'b1;
    end
    mant = q & mask(n);
  endfunction

  // Correct IEEE rounding of P to n bits in mode m; eadj is the exponent increment.
  function automatic void ieee_ref(int n, u128 p, rmode_e m, bit sign,
                                   output u128 mant, output int eadj);
    bit v, r, st, up;
    int sh;
    u128 q;
    v  = p[2*n-1];
    sh = n - 1 + int'(v);
    q  = p >> sh;
    r  = p[sh-1];
    st = (p & mask(sh - 1)) != 0;
    case (m)
      RM_RNE:  up = r && (st || q[0]);
      RM_RNU:  up = r;
      RM_RUP:  up = (r || st) && !sign;
      RM_RDN:  up = (r || st) && sign;
      default: up = 1'b0;
    endcase
    q    = q + u128'(up);
    eadj = int'(v);
    if (q[n]) begin
      q = q >> 1;
      eadj++;
    end
    mant = q & mask(n);
  endfunction

  // Random carry-save split of a value: c + s = val modulo 2^w.
  function automatic void cs_split(int w, u128 val, output u128 c, output u128 s);
    c = rand128() & mask(w);
    s = (val - c) & mask(w);
  endfunction

  // Carry out of the low w bits of c + s.
  function automatic bit low_carry(int w, u128 c, u128 s);
    u128 t;
    t = (c & mask(w)) + (s & mask(w));
    return t[w];
  endfunction

endpackage
