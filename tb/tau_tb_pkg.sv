// tau_tb_pkg: reference arithmetic in Z[tau] for the testbenches.
//
// tau is a root of tau^2 - MU*tau + 2 = 0, so every element of Z[tau] is
// x + y*tau with integers x, y.  The testbenches check the hardware by value,
// not by replaying its algorithm: a digit string d_i stands for
// sum d_i tau^i, evaluated here with Horner's rule on wide integers.  An
// addition of partial expansions must satisfy
//   C + tau^m * gamma == A + alpha + B + beta          (exactly in Z[tau])
// and a product computed with the wrap-around tau^m = 1 must satisfy
//   C + gamma == b * (K + kappa)        (mod tau^m - 1 in Z[tau]).
// Divisibility by g = tau^m - 1 is tested through the conjugate:
// (x + y*tau) / g is in Z[tau] iff both coordinates of (x + y*tau)*conj(g)
// are divisible by the norm N(g) = u^2 + MU*u*v + 2*v^2, g = u + v*tau.
package tau_tb_pkg;

  typedef logic signed [767:0] big_t;

  typedef struct {
    big_t x;
    big_t y;
  } zt_t;

  function automatic zt_t zt_zero();
    zt_t r;
    r.x = '0;
    r.y = '0;
    return r;
  endfunction

  function automatic zt_t zt_make(input int x, input int y);
    zt_t r;
    r.x = big_t'(x);
    r.y = big_t'(y);
    return r;
  endfunction

  // v * tau = x*tau + y*(MU*tau - 2)
  function automatic zt_t zt_mul_tau(input zt_t v, input int mu);
    zt_t r;
    r.x = -(v.y <<< 1);
    r.y = (mu > 0) ? v.x + v.y : v.x - v.y;
    return r;
  endfunction

  function automatic zt_t zt_add(input zt_t a, input zt_t b);
    zt_t r;
    r.x = a.x + b.x;
    r.y = a.y + b.y;
    return r;
  endfunction

  function automatic zt_t zt_sub(input zt_t a, input zt_t b);
    zt_t r;
    r.x = a.x - b.x;
    r.y = a.y - b.y;
    return r;
  endfunction

  function automatic zt_t zt_scale(input zt_t a, input big_t k);
    zt_t r;
    r.x = a.x * k;
    r.y = a.y * k;
    return r;
  endfunction

  function automatic zt_t zt_tau_pow(input int e, input int mu);
    zt_t r;
    r = zt_make(1, 0);
    for (int i = 0; i < e; i++) r = zt_mul_tau(r, mu);
    return r;
  endfunction

  // sum d[i] tau^i
  function automatic zt_t zt_eval(input int d[], input int mu);
    zt_t v;
    v = zt_zero();
    for (int i = d.size() - 1; i >= 0; i--) begin
      v = zt_mul_tau(v, mu);
      v.x = v.x + big_t'(d[i]);
    end
    return v;
  endfunction

  function automatic bit zt_eq(input zt_t a, input zt_t b);
    return (a.x == b.x) && (a.y == b.y);
  endfunction

  // a == b modulo tau^m - 1
  function automatic bit zt_cong(input zt_t a, input zt_t b, input int m, input int mu);
    zt_t  d, g;
    big_t u, v, n, re, im, um;
    d  = zt_sub(a, b);
    g  = zt_tau_pow(m, mu);
    u  = g.x - 1;
    v  = g.y;
    um = (mu > 0) ? u + v : u - v;          // u + MU*v
    n  = (mu > 0) ? u*u + u*v + 2*v*v : u*u - u*v + 2*v*v;
    re = d.x * um + 2 * d.y * v;
    im = d.y * u - d.x * v;
    return ((re % n) == 0) && ((im % n) == 0);
  endfunction

  // Is (t0, t1) one of the 21 carries that Alg. 1 can reach from (0, 0)
  // with digit sums in {-1, 0, 1, 2}?  Found by a search over the carry
  // update t -> (t - s - c)/tau, c = parity of t0 + s.
  function automatic bit in_s0(input int t0, input int t1, input int mu);
    int q0[$], q1[$];
    bit seen [int];
    int a0, a1, r, h, n0, n1;
    q0.push_back(0); q1.push_back(0); seen[0] = 1'b1;
    while (q0.size() > 0) begin
      a0 = q0.pop_front(); a1 = q1.pop_front();
      if (a0 == t0 && a1 == t1) return 1'b1;
      for (int s = -1; s <= 2; s++) begin
        r  = a0 + s;
        h  = (r >= 0) ? r / 2 : -((1 - r) / 2);   // floor(r/2)
        n0 = a1 + mu * h;
        n1 = -h;
        if (!seen.exists(n0 * 64 + n1)) begin
          seen[n0 * 64 + n1] = 1'b1;
          q0.push_back(n0); q1.push_back(n1);
        end
      end
    end
    return 1'b0;
  endfunction

  // a random element of the 21-carry set
  function automatic void rand_s0(output int t0, output int t1, input int mu);
    do begin
      t0 = int'($urandom_range(6)) - 3;
      t1 = int'($urandom_range(4)) - 2;
    end while (!in_s0(t0, t1, mu));
  endfunction

endpackage
