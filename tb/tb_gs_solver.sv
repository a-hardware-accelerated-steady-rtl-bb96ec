// tb_gs_solver: end-to-end testbench for the power-flow solver.
//
// Two solvers run side by side on the default 5-bus grid: one with all
// parameters at their defaults, and one whose reactive power upper limit at
// the voltage-controlled bus is lowered to 0.3 so that the limit is hit.
// Each result is compared with a double-precision run of the same iteration
// (tb_grid_pkg::ref_solve): all voltages, the reactive power and the number
// of clamped steps. The testbench counts how often each mechanism of the
// design happened and fails if one never did: the voltage-controlled and the
// regular bus units running at the same time, loading the initial voltages
// from the ROM, the reactive power limit being hit, and the limit not being
// hit. All of it is observed at the solver's ports. It also checks the
// iteration count and the cycle count of a run, and
// that a second start reruns from the ROM values to the same answer.
module tb_gs_solver;
  import fxp_pkg::*;
  import tb_grid_pkg::*;

  localparam int unsigned N_ITER = 100;
  localparam real TOL = 2.0e-3;
  localparam fx_t Q_MAX_B = 32'sd19661;   // 0.3

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy_a, done_a, lim_a, busy_b, done_b, lim_b;
  cplx_t v_a [N];
  cplx_t v_b [N];
  logic [15:0] it_a, it_b, hits_a, hits_b;
  logic [31:0] cyc_a, cyc_b;
  fx_t q_a, q_b;
  int checks = 0, failures = 0;
  int n_parallel = 0, n_rom_load = 0, n_clamp = 0, n_free = 0;

  gs_solver dut_a (
    .clk, .rst_n, .start, .busy(busy_a), .done(done_a), .v_out(v_a),
    .iter_count(it_a), .cycle_count(cyc_a), .q_pv(q_a), .q_limited(lim_a),
    .limit_hits(hits_a));

  gs_solver #(.Q_MAX(Q_MAX_B)) dut_b (
    .clk, .rst_n, .start, .busy(busy_b), .done(done_b), .v_out(v_b),
    .iter_count(it_b), .cycle_count(cyc_b), .q_pv(q_b), .q_limited(lim_b),
    .limit_hits(hits_b));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, all from the solver's ports.
  // ROM load: during the first step of a run the voltages read back as the
  // initial table (on the second run they held the previous solution before).
  // Clamp / free: q_limited of each finished step.
  logic [15:0] it_a_q = '0, it_b_q = '0;
  always @(posedge clk) begin
    logic all_init;
    all_init = 1'b1;
    for (int n = 0; n < N; n++) if (v_a[n] != V_INIT[n]) all_init = 1'b0;
    if (busy_a && it_a == 16'd0 && all_init) n_rom_load++;
    if (it_b != it_b_q && it_b != 16'd0 && lim_b) n_clamp++;
    if (it_a != it_a_q && it_a != 16'd0 && !lim_a) n_free++;
    it_a_q <= it_a;
    it_b_q <= it_b;
  end

  task automatic check_run(input string name, input cplx_t v [N], input fx_t q,
                           input logic [15:0] it, input logic [15:0] hits,
                           input real q_max);
    real rr [N], ri [N], rq;
    int rh;
    ref_solve(N_ITER, -0.3, q_max, rr, ri, rq, rh);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (rabs(fx2r(v[n].re) - rr[n]) > TOL || rabs(fx2r(v[n].im) - ri[n]) > TOL) begin
        failures++;
        $display("%s bus %0d: got (%f, %f) expected (%f, %f)", name, n,
                 fx2r(v[n].re), fx2r(v[n].im), rr[n], ri[n]);
      end
    end
    checks++;
    if (rabs(fx2r(q) - rq) > 5.0 * TOL) begin
      failures++;
      $display("%s Q got %f expected %f", name, fx2r(q), rq);
    end
    checks++;
    if (int'(it) != N_ITER) begin
      failures++;
      $display("%s iterations %0d", name, it);
    end
    checks++;
    if (int'(hits) < rh - 2 || int'(hits) > rh + 2) begin
      failures++;
      $display("%s clamped steps %0d expected about %0d", name, hits, rh);
    end
    $display("%s: V2 = %f%s%fj, Q = %f, clamped in %0d steps", name, fx2r(v[PV].re),
             v[PV].im < 0 ? " - " : " + ", rabs(fx2r(v[PV].im)), fx2r(q), hits);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      fork
        wait (done_a);
        wait (done_b);
      join
      @(negedge clk);
      check_run("default", v_a, q_a, it_a, hits_a, 0.5);
      check_run("Q-limited", v_b, q_b, it_b, hits_b, 0.3);
      // cycle count: ROM load N + 1, then per step the voltage-controlled
      // update (142 cycles) plus 2 cycles of start and write-back. Run one
      // after another, the four units would need 142 + 17 + 16 + 17 cycles a
      // step; a run that is shorter had them working in parallel.
      checks++;
      if (cyc_a != 32'(N + 1 + N_ITER * 144)) begin
        failures++;
        $display("cycle count %0d", cyc_a);
      end
      if (it_a != 16'd0 && cyc_a < 32'(N_ITER * (142 + 17 + 16 + 17))) n_parallel += int'(it_a);
      $display("run %0d: %0d cycles, %0d steps", run, cyc_a, it_a);
    end
    checks += 4;
    if (n_parallel == 0) begin failures++; $display("units never ran in parallel"); end
    if (n_rom_load == 0) begin failures++; $display("ROM never read"); end
    if (n_clamp == 0)    begin failures++; $display("Q limit never hit"); end
    if (n_free == 0)     begin failures++; $display("Q never inside its limits"); end
    $display("mechanisms: parallel steps %0d, cycles on ROM values %0d, clamped steps %0d, free steps %0d",
             n_parallel, n_rom_load, n_clamp, n_free);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
