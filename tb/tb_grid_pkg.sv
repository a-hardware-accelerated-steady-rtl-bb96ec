// tb_grid_pkg: the default 5-bus grid and a real-arithmetic reference solver
// shared by the solver testbenches.
//
// The constants are the Q16.16 values of the solver's default parameters.
// Bus 0 is the swing bus, bus 2 the voltage-controlled bus and buses 1, 3
// and 4 are load buses; lines join buses 0-3, 1-3, 1-4, 2-4 and 3-4.
// ref_solve repeats the solver's iteration in double precision: in every
// step all non-swing buses are updated from the previous step's voltages,
// the load buses by V_k = ((P - jQ)/conj(V_k) - sum_{n != k} Y_kn V_n) / Y_kk,
// the voltage-controlled bus (first set to its set-point magnitude at its
// present angle) with Q = Im(V_k conj(I_k)) clamped to its
// limits, the same update, and then its magnitude reset to exp(ln|V_spec|)
// unless Q was clamped.
package tb_grid_pkg;
  import fxp_pkg::*;

  localparam int unsigned N = 5;
  localparam int unsigned PV = 2;
  localparam cplx_t Y [N][N] = '{
    '{'{ 32'sd327680, -32'sd983040}, '{32'sd0, 32'sd0}, '{32'sd0, 32'sd0},
      '{-32'sd327680,  32'sd983040}, '{32'sd0, 32'sd0}},
    '{'{32'sd0, 32'sd0}, '{ 32'sd382293, -32'sd1146880}, '{32'sd0, 32'sd0},
      '{-32'sd218453,  32'sd655360}, '{-32'sd163840, 32'sd491520}},
    '{'{32'sd0, 32'sd0}, '{32'sd0, 32'sd0}, '{ 32'sd327680, -32'sd983040},
      '{32'sd0, 32'sd0}, '{-32'sd327680, 32'sd983040}},
    '{'{-32'sd327680, 32'sd983040}, '{-32'sd218453, 32'sd655360}, '{32'sd0, 32'sd0},
      '{ 32'sd677205, -32'sd2031616}, '{-32'sd131072, 32'sd393216}},
    '{'{32'sd0, 32'sd0}, '{-32'sd163840, 32'sd491520}, '{-32'sd327680, 32'sd983040},
      '{-32'sd131072, 32'sd393216}, '{ 32'sd622592, -32'sd1867776}}};
  localparam cplx_t INV [N] = '{
    '{32'sd1311, 32'sd3932}, '{32'sd1123, 32'sd3370}, '{32'sd1311, 32'sd3932},
    '{32'sd634, 32'sd1903}, '{32'sd690, 32'sd2070}};
  localparam fx_t P_SPEC [N] = '{32'sd0, -32'sd39322, 32'sd26214, -32'sd29491, -32'sd26214};
  localparam fx_t Q_SPEC [N] = '{32'sd0, -32'sd13107, 32'sd0, -32'sd9830, -32'sd3277};
  localparam fx_t LN_VMAG = 32'sd1298;
  localparam cplx_t V_INIT [N] = '{
    '{32'sd65536, 32'sd0}, '{32'sd65536, 32'sd0}, '{32'sd66847, 32'sd0},
    '{32'sd65536, 32'sd0}, '{32'sd65536, 32'sd0}};

  function automatic real fx2r(fx_t x);
    return real'(x) / 65536.0;
  endfunction

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // Runs `iters` steps; returns the voltages, the last Q of the
  // voltage-controlled bus and the number of steps in which it was clamped.
  task automatic ref_solve(input int iters, input real q_min, input real q_max,
                           output real vr [N], output real vi [N],
                           output real q_last, output int hits);
    real nr [N], ni [N];
    real sr, si, ir, ii, q, d, tr, ti, dr, di, mag, ang;
    logic clamped;
    for (int n = 0; n < N; n++) begin
      vr[n] = fx2r(V_INIT[n].re);
      vi[n] = fx2r(V_INIT[n].im);
    end
    hits = 0;
    q_last = 0.0;
    for (int it = 0; it < iters; it++) begin
      for (int k = 1; k < N; k++) begin
        real ur [N], ui [N];
        for (int n = 0; n < N; n++) begin
          ur[n] = vr[n];
          ui[n] = vi[n];
        end
        if (k == PV) begin
          // present angle, set-point magnitude
          mag = $exp(fx2r(LN_VMAG));
          ang = $atan2(vi[k], vr[k]);
          ur[k] = mag * $cos(ang);
          ui[k] = mag * $sin(ang);
        end
        sr = 0.0; si = 0.0; ir = 0.0; ii = 0.0;
        for (int n = 0; n < N; n++) begin
          ir += fx2r(Y[k][n].re) * ur[n] - fx2r(Y[k][n].im) * ui[n];
          ii += fx2r(Y[k][n].re) * ui[n] + fx2r(Y[k][n].im) * ur[n];
          if (n != k) begin
            sr += fx2r(Y[k][n].re) * ur[n] - fx2r(Y[k][n].im) * ui[n];
            si += fx2r(Y[k][n].re) * ui[n] + fx2r(Y[k][n].im) * ur[n];
          end
        end
        q = fx2r(Q_SPEC[k]);
        clamped = 1'b0;
        if (k == PV) begin
          q = ui[k] * ir - ur[k] * ii;
          if (q > q_max) begin
            q = q_max; hits++; clamped = 1'b1;
          end else if (q < q_min) begin
            q = q_min; hits++; clamped = 1'b1;
          end
          q_last = q;
        end
        d  = ur[k] * ur[k] + ui[k] * ui[k];
        tr = (fx2r(P_SPEC[k]) * ur[k] + q * ui[k]) / d;
        ti = (fx2r(P_SPEC[k]) * ui[k] - q * ur[k]) / d;
        dr = tr - sr; di = ti - si;
        nr[k] = dr * fx2r(INV[k].re) - di * fx2r(INV[k].im);
        ni[k] = dr * fx2r(INV[k].im) + di * fx2r(INV[k].re);
        if (k == PV && !clamped) begin
          mag = $exp(fx2r(LN_VMAG));
          ang = $atan2(ni[k], nr[k]);
          nr[k] = mag * $cos(ang);
          ni[k] = mag * $sin(ang);
        end
      end
      for (int k = 1; k < N; k++) begin
        vr[k] = nr[k];
        vi[k] = ni[k];
      end
    end
  endtask
endpackage
