// tb_gs_solver_full: one complete solve of the default 5-bus grid with the
// solver exactly as built (every parameter at its default).
//
// Starts the solver once, waits for `done`, and compares every bus voltage,
// the reactive power of the voltage-controlled bus, the step count and the
// cycle count with a double-precision run of the same iteration
// (tb_grid_pkg::ref_solve).
module tb_gs_solver_full;
  import fxp_pkg::*;
  import tb_grid_pkg::*;

  localparam int unsigned N_ITER = 100;
  localparam real TOL = 2.0e-3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, lim;
  cplx_t v [N];
  logic [15:0] it, hits;
  logic [31:0] cyc;
  fx_t q;
  int checks = 0, failures = 0;

  gs_solver dut (
    .clk, .rst_n, .start, .busy, .done, .v_out(v), .iter_count(it),
    .cycle_count(cyc), .q_pv(q), .q_limited(lim), .limit_hits(hits));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rr [N], ri [N], rq;
    int rh;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
    ref_solve(N_ITER, -0.3, 0.5, rr, ri, rq, rh);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (rabs(fx2r(v[n].re) - rr[n]) > TOL || rabs(fx2r(v[n].im) - ri[n]) > TOL) begin
        failures++;
        $display("bus %0d: got (%f, %f) expected (%f, %f)", n, fx2r(v[n].re), fx2r(v[n].im),
                 rr[n], ri[n]);
      end
      $display("bus %0d: |V| = %f, angle = %f deg", n,
               $sqrt(fx2r(v[n].re) ** 2 + fx2r(v[n].im) ** 2),
               $atan2(fx2r(v[n].im), fx2r(v[n].re)) * 57.29577951);
    end
    checks += 4;
    if (rabs(fx2r(q) - rq) > 5.0 * TOL) begin
      failures++;
      $display("Q got %f expected %f", fx2r(q), rq);
    end
    if (it != 16'(N_ITER)) failures++;
    if (hits != 16'(rh) || lim) failures++;
    if (cyc != 32'(N + 1 + N_ITER * 144)) begin
      failures++;
      $display("cycle count %0d", cyc);
    end
    $display("%0d steps in %0d cycles (%0d us at 100 MHz)", it, cyc, cyc / 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
