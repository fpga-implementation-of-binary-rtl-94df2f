// gf_model_pkg: reference arithmetic for the testbenches, written for
// clarity rather than speed and independently of the RTL.
//
//   mul      schoolbook carry-less product, then bit-by-bit long division
//            by f(z) = z^163 + z^7 + z^6 + z^3 + 1
//   inv      Fermat: a^(2^163 - 2) by square-and-multiply
//   padd     the projective unified addition, one line per formula term
//   aff_add  the affine unified addition (with inversions), used to check
//            the projective result after converting it to affine form
//   on_curve the curve equation d1(x+y)+d2(x^2+y^2) = xy+xy(x+y)+x^2y^2
//   rand_point  a random affine point: picks x, solves the quadratic in y
//            with the half-trace (valid for odd m)
package gf_model_pkg;

  localparam int M = 163;
  typedef logic [M-1:0] fe_t;
  localparam logic [M:0] F = {1'b1, 155'd0, 8'hC9};

  function automatic fe_t mul(fe_t a, fe_t b);
    logic [2*M-2:0] c;
    c = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        c[i+j] = c[i+j] ^ (a[i] & b[j]);
    for (int i = 2*M-2; i >= M; i--)
      if (c[i]) c[i-:M+1] = c[i-:M+1] ^ F;
    return c[M-1:0];
  endfunction

  function automatic fe_t sq(fe_t a);
    return mul(a, a);
  endfunction

  function automatic fe_t inv(fe_t a);
    fe_t r, p;
    r = fe_t'(1); p = a;
    // exponent 2^M - 2 = binary 11..10 (M-1 ones, then a zero)
    for (int i = 0; i < M; i++) begin
      if (i != 0) r = mul(r, p);
      p = sq(p);
    end
    return r;
  endfunction

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < M; i += 32) r = (r << 32) | fe_t'($urandom);
    return r;
  endfunction

  function automatic void padd(input fe_t X1, Y1, Z1, X2, Y2, Z2, d1, d2,
                               output fe_t X3, Y3, Z3);
    fe_t W1, W2, A, B, C, D, E, H, I, U, V, S;
    W1 = X1 ^ Y1;              W2 = X2 ^ Y2;
    A  = mul(X1, X1 ^ Z1);     B  = mul(Y1, Y1 ^ Z1);
    C  = mul(Z1, Z2);          D  = mul(W2, Z2);
    E  = mul(d1, mul(C, C));
    H  = mul(mul(mul(d1, Z2) ^ mul(d2, W2), W1), C);
    I  = mul(mul(d1, C), Z1);
    U  = E ^ mul(A, D);        V  = E ^ mul(B, D);
    S  = mul(U, V);
    X3 = mul(S, Y1) ^ mul(mul(H ^ mul(X2, I ^ mul(A, Y2 ^ Z2)), V), Z1);
    Y3 = mul(S, X1) ^ mul(mul(H ^ mul(Y2, I ^ mul(B, X2 ^ Z2)), U), Z1);
    Z3 = mul(S, Z1);
  endfunction

  function automatic void aff_add(input fe_t x1, y1, x2, y2, d1, d2,
                                  output fe_t x3, y3);
    fe_t nx, dx, ny, dy, k;
    k  = mul(d2, mul(x1 ^ y1, x2 ^ y2));
    nx = mul(d1, x1 ^ x2) ^ k ^ mul(x1 ^ sq(x1), mul(x2, y1 ^ y2 ^ fe_t'(1)) ^ mul(y1, y2));
    dx = d1 ^ mul(x1 ^ sq(x1), x2 ^ y2);
    ny = mul(d1, y1 ^ y2) ^ k ^ mul(y1 ^ sq(y1), mul(y2, x1 ^ x2 ^ fe_t'(1)) ^ mul(x1, x2));
    dy = d1 ^ mul(y1 ^ sq(y1), x2 ^ y2);
    x3 = mul(nx, inv(dx));
    y3 = mul(ny, inv(dy));
  endfunction

  function automatic logic on_curve(fe_t x, fe_t y, fe_t d1, fe_t d2);
    fe_t xy;
    xy = mul(x, y);
    return (mul(d1, x ^ y) ^ mul(d2, sq(x) ^ sq(y))) == (xy ^ mul(xy, x ^ y) ^ sq(xy));
  endfunction

  function automatic fe_t trace(fe_t c);
    fe_t t, s;
    t = c; s = c;
    for (int i = 1; i < M; i++) begin s = sq(s); t = t ^ s; end
    return t;
  endfunction

  function automatic fe_t half_trace(fe_t c);
    fe_t t, s;
    t = c; s = c;
    for (int i = 1; i <= (M - 1) / 2; i++) begin s = sq(sq(s)); t = t ^ s; end
    return t;
  endfunction

  // y^2 (d2+x+x^2) + y (d1+x+x^2) + (d1 x + d2 x^2) = 0, solved for y.
  function automatic void rand_point(input fe_t d1, d2, output fe_t x, y);
    fe_t al, be, ga, c;
    for (int tries = 0; tries < 64; tries++) begin
      x  = rand_fe();
      al = d2 ^ x ^ sq(x);
      be = d1 ^ x ^ sq(x);
      ga = mul(d1, x) ^ mul(d2, sq(x));
      if (al == '0 || be == '0) continue;
      c = mul(mul(ga, al), inv(sq(be)));
      if (trace(c) != '0) continue;
      y = mul(mul(be, inv(al)), half_trace(c));
      return;
    end
    x = '0; y = '0;   // (0,0) is on every such curve
  endfunction

endpackage
