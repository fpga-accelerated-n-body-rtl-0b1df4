// nbody_ref_pkg: reference model of the N-body arithmetic for testbenches.
//
// Computes, with the correctly rounded single-precision operations of
// fp_ref_pkg and in the same order of operations as the hardware, the
// acceleration of one pair, the update of one particle, and a whole time
// step of the all-pairs algorithm (for each particle i, contributions of
// j = 0 .. N-1 summed in that order, starting from +0).
package nbody_ref_pkg;
  import fp_ref_pkg::*;
  import nbody_pkg::*;

  // acceleration exerted on i by j; `near` tells whether the pair counted
  function automatic accel_t pair_acc(particle_t pi, particle_t pj, logic self,
                                      fp32_t g, fp32_t soft2, fp32_t cut2,
                                      output logic near);
    fp32_t dx, dy, gm, r2, r2s, r, r3, s;
    accel_t acc;
    dx  = fsub(pj.x, pi.x);
    dy  = fsub(pj.y, pi.y);
    gm  = fmul(g, pj.m);
    r2  = fadd(fmul(dx, dx), fmul(dy, dy));
    near = !self && (f2r(r2) < f2r(cut2));
    r2s = fadd(r2, soft2);
    r   = fsqrt(r2s);
    r3  = fmul(r2s, r);
    s   = fdiv(gm, r3);
    acc.ax = near ? fmul(s, dx) : 32'd0;
    acc.ay = near ? fmul(s, dy) : 32'd0;
    return acc;
  endfunction

  function automatic particle_t update(particle_t p, accel_t a, fp32_t dt);
    particle_t q;
    q.vx = fadd(p.vx, fmul(a.ax, dt));
    q.vy = fadd(p.vy, fmul(a.ay, dt));
    q.x  = fadd(p.x, fmul(q.vx, dt));
    q.y  = fadd(p.y, fmul(q.vy, dt));
    q.m  = p.m;
    return q;
  endfunction

  // one time step in place; returns the number of nearby (counted) pairs
  function automatic longint step(ref particle_t p[], input fp32_t g, fp32_t dt,
                                  fp32_t soft2, fp32_t cut2);
    accel_t acc [];
    accel_t c;
    logic   near;
    longint n_near = 0;
    acc = new[p.size()];
    for (int i = 0; i < p.size(); i++) begin
      acc[i] = '0;
      for (int jj = 0; jj < p.size(); jj++) begin
        c = pair_acc(p[i], p[jj], i == jj, g, soft2, cut2, near);
        if (near) n_near++;
        acc[i].ax = fadd(acc[i].ax, c.ax);
        acc[i].ay = fadd(acc[i].ay, c.ay);
      end
    end
    for (int i = 0; i < p.size(); i++) p[i] = update(p[i], acc[i], dt);
    return n_near;
  endfunction

  // random particle: position in [-50, 50), velocity in [-1, 1), mass in [1, 10)
  function automatic particle_t rnd_particle();
    particle_t p;
    p.x  = r2f((real'($urandom % 100000) / 1000.0) - 50.0);
    p.y  = r2f((real'($urandom % 100000) / 1000.0) - 50.0);
    p.vx = r2f((real'($urandom % 2000) / 1000.0) - 1.0);
    p.vy = r2f((real'($urandom % 2000) / 1000.0) - 1.0);
    p.m  = r2f(1.0 + real'($urandom % 9000) / 1000.0);
    return p;
  endfunction

endpackage
