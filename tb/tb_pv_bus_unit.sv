// tb_pv_bus_unit: self-checking testbench for the voltage-controlled bus update.
//
// Uses the admittance rows of the default 5-bus grid and random voltage
// vectors around 1.0 per unit. For each run the reference is worked out in
// real arithmetic, with V_k first set to its set-point magnitude at its
// present angle: Q = Im(V_k conj(sum_n Y_kn V_n)), clamped to the limits;
// V' = ((P - jQ)/conj(V_k) - sum_{n != k} Y_kn V_n) / Y_kk; and the result
// exp(ln|V_spec|) * e^(j angle V'), or V' itself when Q was clamped (the bus
// then acts as a load bus). Runs alternate between wide limits and
// tight ones, so that both the unclamped and the clamped path (above and
// below) are taken; each is counted and must occur. The update latency is
// checked: N + max(k, N-1-k) + NR_ITERS + 5*ITERS + 30 cycles, and
// 2*ITERS + 6 fewer when Q was clamped.
module tb_pv_bus_unit;
  import fxp_pkg::*;

  localparam int unsigned N = 5;
  localparam int unsigned NR_ITERS = 5;
  localparam real TOL = 12.0 / 65536.0;
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

  localparam int unsigned ITERS = 20;
  localparam int unsigned LAT_BASE = N + NR_ITERS + 5 * ITERS + 30;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] bus_idx;
  cplx_t y_row [N];
  cplx_t inv_ykk;
  fx_t p, q_min, q_max, ln_vmag, q_calc;
  cplx_t v [N];
  cplx_t v_new;
  logic busy, done, q_limited;
  int checks = 0, failures = 0;
  int n_free = 0, n_high = 0, n_low = 0;

  pv_bus_unit #(.N_BUS(N), .NR_ITERS(NR_ITERS), .ITERS(ITERS)) dut (
    .clk, .rst_n, .start, .bus_idx, .y_row, .inv_ykk, .p, .q_min, .q_max, .ln_vmag,
    .v, .busy, .done, .v_new, .q_calc, .q_limited);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction
  function automatic real fx2r(fx_t x);
    return real'(x) / 65536.0;
  endfunction
  function automatic fx_t r2fx(real r);
    return fx_t'($rtoi(r * 65536.0));
  endfunction
  function automatic real urand(real lo_v, real hi_v);
    return lo_v + (hi_v - lo_v) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  initial begin
    real vr [N], vi [N], ir, ii, qv, qc, sr, si, tr, ti, dr, di, d, gr, gi, mag, ang, er, ei, m, a;
    int cyc, k;
    logic lim;
    bus_idx = '0; p = '0; q_min = '0; q_max = '0; ln_vmag = '0; inv_ykk = '0;
    for (int n = 0; n < N; n++) begin
      y_row[n] = '0;
      v[n] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 120; t++) begin
      k = (t % 2 == 0) ? 2 : (t % 3);
      for (int n = 0; n < N; n++) begin
        m = urand(0.95, 1.05);
        a = urand(-0.1, 0.1);
        v[n] = cx_make(r2fx(m * $cos(a)), r2fx(m * $sin(a)));
        y_row[n] = Y[k][n];
      end
      inv_ykk = INV[k];
      p       = r2fx(urand(-0.8, 0.8));
      ln_vmag = r2fx(urand(-0.08, 0.08));
      if (t % 4 < 2) begin
        q_min = r2fx(-100.0); q_max = r2fx(100.0);
      end else begin
        q_min = r2fx(-0.3);   q_max = r2fx(0.3);
      end
      bus_idx = 3'(k);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      for (int n = 0; n < N; n++) begin
        vr[n] = fx2r(v[n].re);
        vi[n] = fx2r(v[n].im);
      end
      // bus k at its set-point magnitude
      mag = $exp(fx2r(ln_vmag));
      ang = $atan2(vi[k], vr[k]);
      vr[k] = mag * $cos(ang);
      vi[k] = mag * $sin(ang);
      ir = 0.0; ii = 0.0; sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        ir += fx2r(Y[k][n].re) * vr[n] - fx2r(Y[k][n].im) * vi[n];
        ii += fx2r(Y[k][n].re) * vi[n] + fx2r(Y[k][n].im) * vr[n];
        if (n != k) begin
          sr += fx2r(Y[k][n].re) * vr[n] - fx2r(Y[k][n].im) * vi[n];
          si += fx2r(Y[k][n].re) * vi[n] + fx2r(Y[k][n].im) * vr[n];
        end
      end
      qv  = vi[k] * ir - vr[k] * ii;
      lim = 1'b0;
      qc  = qv;
      if (qv > fx2r(q_max)) begin
        qc = fx2r(q_max); lim = 1'b1; n_high++;
      end else if (qv < fx2r(q_min)) begin
        qc = fx2r(q_min); lim = 1'b1; n_low++;
      end else n_free++;
      checks += 2;
      if (rabs(fx2r(q_calc) - qc) > 2.0 * TOL) begin
        failures++;
        $display("Q got %f expected %f", fx2r(q_calc), qc);
      end
      if (q_limited != lim) begin
        failures++;
        $display("q_limited %b expected %b (Q %f)", q_limited, lim, qv);
      end
      d  = vr[k] * vr[k] + vi[k] * vi[k];
      tr = (fx2r(p) * vr[k] + fx2r(q_calc) * vi[k]) / d;
      ti = (fx2r(p) * vi[k] - fx2r(q_calc) * vr[k]) / d;
      dr = tr - sr; di = ti - si;
      gr = dr * fx2r(INV[k].re) - di * fx2r(INV[k].im);
      gi = dr * fx2r(INV[k].im) + di * fx2r(INV[k].re);
      if (lim) begin
        er = gr;
        ei = gi;
      end else begin
        ang = $atan2(gi, gr);
        er = mag * $cos(ang);
        ei = mag * $sin(ang);
      end
      checks += 2;
      if (rabs(fx2r(v_new.re) - er) > TOL || rabs(fx2r(v_new.im) - ei) > TOL) begin
        failures++;
        $display("bus %0d: got (%f, %f) expected (%f, %f)", k, fx2r(v_new.re), fx2r(v_new.im), er, ei);
      end
      if (cyc != (lim ? LAT_BASE - 2 * ITERS - 6 : LAT_BASE) + ((k > N - 1 - k) ? k : N - 1 - k)) begin
        failures++;
        $display("latency %0d (bus %0d, clamped %b)", cyc, k, lim);
      end
    end
    checks += 3;
    if (n_free == 0) failures++;
    if (n_high == 0) failures++;
    if (n_low == 0) failures++;
    $display("unclamped %0d, clamped high %0d, clamped low %0d", n_free, n_high, n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
