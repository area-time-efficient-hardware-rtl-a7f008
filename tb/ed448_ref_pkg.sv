// ed448_ref_pkg: software reference arithmetic for the Ed448 testbenches.
//
// Plain wide-integer models, written independently of the RTL datapath:
// field operations use the simulator's 1024-bit multiply and modulo, Edwards
// scalar multiplication uses the projective unified addition
//   A = Z1Z2, B = A^2, C = X1X2, D = Y1Y2, E = dCD, F = B - E, G = B + E,
//   X3 = A F ((X1+Y1)(X2+Y2) - C - D), Y3 = A G (D - C), Z3 = F G
// (for doubling too) with left-to-right double-and-add, and the
// Edwards-to-Montgomery map u = y^2/x^2, v = y (2 - x^2 - y^2)/x^3.
package ed448_ref_pkg;
  import ed448_pkg::*;

  typedef logic [1023:0] w_t;

  localparam fe_t D_EDW = P - fe_t'(39081);
  localparam fe_t BASE_X =
    448'h4f1970c66bed0ded221d15a622bf36da9e146570470f1767ea6de324a3d3a46412ae1af72ab66511433b80e18b00938e2626a82bc70cc05e;
  localparam fe_t BASE_Y =
    448'h693f46716eb6bc248876203756c9c7624bea73736ca3984087789c1e05a0c2d73ad3ff1ce67c39c4fdbd132c4ed7c8ad9808795bf230fa14;

  function automatic fe_t fmul(input fe_t a, input fe_t b);
    return fe_t'((w_t'(a) * w_t'(b)) % w_t'(P));
  endfunction
  function automatic fe_t fadd(input fe_t a, input fe_t b);
    return fe_t'((w_t'(a) + w_t'(b)) % w_t'(P));
  endfunction
  function automatic fe_t fsub(input fe_t a, input fe_t b);
    return fe_t'((w_t'(a) + w_t'(P) - w_t'(b)) % w_t'(P));
  endfunction
  function automatic fe_t finv(input fe_t a);
    fe_t r = fe_t'(1);
    fe_t e = P - fe_t'(2);
    for (int i = FW - 1; i >= 0; i--) begin
      r = fmul(r, r);
      if (e[i]) r = fmul(r, a);
    end
    return r;
  endfunction

  typedef struct { fe_t x, y, z; } ept_t;

  function automatic ept_t eadd(input ept_t p1, input ept_t p2);
    fe_t a, b, c, d, e, f, g, t;
    ept_t r;
    a = fmul(p1.z, p2.z);
    b = fmul(a, a);
    c = fmul(p1.x, p2.x);
    d = fmul(p1.y, p2.y);
    e = fmul(D_EDW, fmul(c, d));
    f = fsub(b, e);
    g = fadd(b, e);
    t = fsub(fsub(fmul(fadd(p1.x, p1.y), fadd(p2.x, p2.y)), c), d);
    r.x = fmul(fmul(a, f), t);
    r.y = fmul(fmul(a, g), fsub(d, c));
    r.z = fmul(f, g);
    return r;
  endfunction

  // affine [k](x, y) on the Edwards curve
  task automatic ed_mul(input logic [447:0] k, input fe_t x, input fe_t y,
                        output fe_t rx, output fe_t ry);
    ept_t q, p0;
    fe_t zi;
    q  = '{x: '0, y: fe_t'(1), z: fe_t'(1)};
    p0 = '{x: x, y: y, z: fe_t'(1)};
    for (int i = 447; i >= 0; i--) begin
      q = eadd(q, q);
      if (k[i]) q = eadd(q, p0);
    end
    zi = finv(q.z);
    rx = fmul(q.x, zi);
    ry = fmul(q.y, zi);
  endtask

  // Edwards affine point to the Montgomery affine point (4-isogeny)
  task automatic to_mont(input fe_t x, input fe_t y, output fe_t u, output fe_t v);
    fe_t x2, y2, xi;
    x2 = fmul(x, x);
    y2 = fmul(y, y);
    xi = finv(x);
    u  = fmul(y2, fmul(xi, xi));
    v  = fmul(fmul(y, fsub(fsub(fe_t'(2), x2), y2)), fmul(xi, fmul(xi, xi)));
  endtask

endpackage
