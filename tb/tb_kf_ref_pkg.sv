// tb_kf_ref_pkg: reference model of the tracking filter for the testbenches.
//
// Plain 64-bit integer arithmetic on the default number format (10 integer,
// 20 fraction bits), written from the filter equations, not from the RTL:
// a product is (a*b) >> 20 with arithmetic shift, every result is wrapped
// to 30 bits, 1/S is floor(2^40 / S) saturated to the largest 30-bit number.
package tb_kf_ref_pkg;

  localparam int W = 30;
  localparam int F = 20;
  localparam longint MAXV = (longint'(1) <<< (W - 1)) - 1;
  localparam longint ONE  = longint'(1) <<< F;

  typedef struct {
    longint p, s, c00, c01, c11;
  } axis_t;

  typedef struct {
    axis_t  x, y;
    longint info;
  } track_t;

  function automatic longint wrap(longint v);
    longint m;
    m = v & ((longint'(1) <<< W) - 1);
    if (m >= (longint'(1) <<< (W - 1))) m = m - (longint'(1) <<< W);
    return m;
  endfunction

  function automatic longint fm(longint a, longint b);
    return wrap((a * b) >>> F);
  endfunction

  function automatic longint to_fx(real r);
    return wrap(longint'($floor(r * real'(ONE) + 0.5)));
  endfunction

  function automatic real to_real(longint v);
    return real'(v) / real'(ONE);
  endfunction

  // Prediction with A = [1 t; 0 1], t = +dt or -dt.
  function automatic axis_t predict(bit pos, longint dt, longint q00,
                                    longint q01, longint q11, axis_t a);
    axis_t  o;
    longint t;
    t     = pos ? dt : wrap(-dt);
    o.p   = wrap(a.p + fm(t, a.s));
    o.s   = a.s;
    o.c00 = wrap(a.c00 + 2 * fm(t, a.c01) + fm(fm(dt, dt), a.c11) + q00);
    o.c01 = wrap(a.c01 + fm(t, a.c11) + q01);
    o.c11 = wrap(a.c11 + q11);
    return o;
  endfunction

  function automatic longint recip(longint s);
    longint q;
    if (s <= 0) return MAXV;
    q = (longint'(1) <<< (2 * F)) / s;
    return (q > MAXV) ? MAXV : q;
  endfunction

  // Gain K = P'(:,0) / (P'00 + R).
  function automatic void gain(longint r, axis_t a, output longint k0,
                               output longint k1);
    longint rc;
    rc = recip(wrap(a.c00 + r));
    k0 = fm(a.c00, rc);
    k1 = fm(a.c01, rc);
  endfunction

  // Update with position measurement z, Joseph-form covariance.
  function automatic axis_t update(bit has, longint r, longint z, axis_t a,
                                   longint k0, longint k1);
    axis_t  o;
    longint e, om, kk;
    if (!has) return a;
    e     = wrap(z - a.p);
    om    = wrap(ONE - k0);
    o.p   = wrap(a.p + fm(k0, e));
    o.s   = wrap(a.s + fm(k1, e));
    o.c00 = wrap(fm(fm(om, om), a.c00) + fm(fm(k0, k0), r));
    o.c01 = wrap(fm(om, wrap(a.c01 - fm(k1, a.c00))) + fm(fm(k0, k1), r));
    kk    = fm(k1, k1);
    o.c11 = wrap(fm(kk, a.c00) - 2 * fm(k1, a.c01) + a.c11 + fm(kk, r));
    return o;
  endfunction

  // Squared distance, exact.
  function automatic longint d2(longint zx, longint zy, longint x, longint y);
    return (zx - x) * (zx - x) + (zy - y) * (zy - y);
  endfunction

  // Direction of each axis for block operations 0..3:
  // (x-,y+) (x-,y-) (x+,y+) (x+,y-)
  function automatic bit op_xpos(int op);
    return (op >= 2);
  endfunction
  function automatic bit op_ypos(int op);
    return (op == 0 || op == 2);
  endfunction

  // One full filter step of one track against a measurement list.
  function automatic track_t step(track_t t, int n, longint zx[], longint zy[],
                                  longint dt, longint q00, longint q01,
                                  longint q11, longint r, output int op_o,
                                  output bit has_o);
    axis_t  px [2], py [2];
    longint kx0 [2], kx1 [2], ky0 [2], ky1 [2];
    longint best;
    int     bop, bj;
    track_t o;
    for (int d = 0; d < 2; d++) begin
      px[d] = predict(d == 1, dt, q00, q01, q11, t.x);
      py[d] = predict(d == 1, dt, q00, q01, q11, t.y);
      gain(r, px[d], kx0[d], kx1[d]);
      gain(r, py[d], ky0[d], ky1[d]);
    end
    best = 0; bop = 0; bj = 0;
    for (int j = 0; j < n; j++)
      for (int op = 0; op < 4; op++) begin
        longint dd;
        dd = d2(zx[j], zy[j], px[op_xpos(op)].p, py[op_ypos(op)].p);
        if ((j == 0 && op == 0) || dd < best) begin
          best = dd; bop = op; bj = j;
        end
      end
    has_o = (n > 0);
    op_o  = has_o ? bop : 0;
    if (!has_o) bj = 0;
    begin
      int xd, yd;
      xd = op_xpos(op_o);
      yd = op_ypos(op_o);
      o.x = update(has_o, r, has_o ? zx[bj] : 0, px[xd], kx0[xd], kx1[xd]);
      o.y = update(has_o, r, has_o ? zy[bj] : 0, py[yd], ky0[yd], ky1[yd]);
    end
    o.info = (longint'(bj) <<< 3) | (longint'(has_o) <<< 2) | longint'(op_o);
    return o;
  endfunction

endpackage
