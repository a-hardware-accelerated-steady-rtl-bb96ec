// tb_pq_bus_unit: self-checking testbench for the regular-bus update.
//
// Uses the admittance rows of the default 5-bus grid, random voltage
// vectors around 1.0 per unit and random scheduled powers, runs the update
// for every bus index and compares the new voltage with
//   ((P - jQ)/conj(V_k) - sum_{n != k} Y_kn V_n) * (1/Y_kk)
// worked out in real arithmetic (with the same Q16.16 value of 1/Y_kk). It
// checks the max(k, N-1-k) + NR_ITERS + 8 cycle latency.
module tb_pq_bus_unit;
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

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] bus_idx;
  cplx_t y_row [N];
  cplx_t inv_ykk;
  fx_t p, q;
  cplx_t v [N];
  cplx_t v_new;
  logic busy, done;
  int checks = 0, failures = 0;

  pq_bus_unit #(.N_BUS(N), .NR_ITERS(NR_ITERS)) dut (
    .clk, .rst_n, .start, .bus_idx, .y_row, .inv_ykk, .p, .q, .v, .busy, .done, .v_new);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    real vr [N], vi [N], sr, si, tr, ti, dr, di, d, er, ei, pr, qr, m, a;
    int cyc, k, lat;
    bus_idx = '0; p = '0; q = '0; inv_ykk = '0;
    for (int n = 0; n < N; n++) begin
      y_row[n] = '0;
      v[n] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      k = t % N;
      for (int n = 0; n < N; n++) begin
        m = urand(0.9, 1.1);
        a = urand(-0.2, 0.2);
        v[n] = cx_make(r2fx(m * $cos(a)), r2fx(m * $sin(a)));
        y_row[n] = Y[k][n];
      end
      inv_ykk = INV[k];
      p = r2fx(urand(-1.0, 1.0));
      q = r2fx(urand(-0.5, 0.5));
      bus_idx = 3'(k);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      // reference
      for (int n = 0; n < N; n++) begin
        vr[n] = fx2r(v[n].re);
        vi[n] = fx2r(v[n].im);
      end
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) if (n != k) begin
        sr += fx2r(Y[k][n].re) * vr[n] - fx2r(Y[k][n].im) * vi[n];
        si += fx2r(Y[k][n].re) * vi[n] + fx2r(Y[k][n].im) * vr[n];
      end
      pr = fx2r(p); qr = fx2r(q);
      // (pr - j qr) / (vr - j vi)
      d  = vr[k] * vr[k] + vi[k] * vi[k];
      tr = (pr * vr[k] + qr * vi[k]) / d;
      ti = (pr * vi[k] - qr * vr[k]) / d;
      dr = tr - sr; di = ti - si;
      er = dr * fx2r(INV[k].re) - di * fx2r(INV[k].im);
      ei = dr * fx2r(INV[k].im) + di * fx2r(INV[k].re);
      checks += 2;
      if (rabs(fx2r(v_new.re) - er) > TOL || rabs(fx2r(v_new.im) - ei) > TOL) begin
        failures++;
        $display("bus %0d: got (%f, %f) expected (%f, %f)", k, fx2r(v_new.re), fx2r(v_new.im), er, ei);
      end
      lat = ((k > N - 1 - k) ? k : N - 1 - k) + NR_ITERS + 8;
      if (cyc != lat) begin
        failures++;
        $display("bus %0d latency %0d expected %0d", k, cyc, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
