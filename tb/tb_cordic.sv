// tb_cordic: self-checking testbench for the cordic unit.
//
// Rotation mode is checked against cos/sin of random angles over the whole
// circle (and rotation of random vectors), vectoring mode against the
// magnitude and atan2 of random vectors in all four quadrants, and the
// exponential mode against exp() for arguments in [-1, 1]. References come
// from real arithmetic. It also checks the latency of each mode.
module tb_cordic;
  import fxp_pkg::*;

  localparam int unsigned ITERS = 20;
  localparam real PI  = 3.14159265358979;
  localparam real TOL = 6.0 / 65536.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] mode;
  fx_t  x_in, y_in, z_in, x_out, y_out, z_out;
  logic busy, done;
  int   checks = 0, failures = 0;

  cordic #(.ITERS(ITERS)) dut (.clk, .rst_n, .start, .mode, .x_in, .y_in, .z_in,
                               .busy, .done, .x_out, .y_out, .z_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fx2r(fx_t v);
    return real'(v) / 65536.0;
  endfunction
  function automatic fx_t r2fx(real r);
    return fx_t'($rtoi(r * 65536.0 + (r < 0 ? -0.5 : 0.5)));
  endfunction

  task automatic check(input string what, input real got, input real exp_v, input real tol);
    real e;
    e = got - exp_v;
    if (e < 0) e = -e;
    checks++;
    if (e > tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp_v);
    end
  endtask

  task automatic run(input logic [1:0] m, input real x, input real y, input real z);
    int cyc;
    mode = m; x_in = r2fx(x); y_in = r2fx(y); z_in = r2fx(z);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != ((m == 2'd2) ? ITERS + 4 : ITERS + 2)) begin
      failures++;
      $display("mode %0d latency %0d", m, cyc);
    end
  endtask

  initial begin
    real ang, mag, x, y, z, d;
    mode = '0; x_in = '0; y_in = '0; z_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // rotation: cos and sin over the whole circle
    for (int i = 0; i < 100; i++) begin
      ang = (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * (PI - 0.001);
      run(2'd0, 1.0, 0.0, ang);
      check("cos", fx2r(x_out), $cos(ang), TOL);
      check("sin", fx2r(y_out), $sin(ang), TOL);
    end
    // rotation of a general vector
    for (int i = 0; i < 50; i++) begin
      x   = real'($urandom_range(0, 4000)) / 1000.0 - 2.0;
      y   = real'($urandom_range(0, 4000)) / 1000.0 - 2.0;
      ang = (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * (PI - 0.001);
      run(2'd0, x, y, ang);
      check("rot.x", fx2r(x_out), x * $cos(ang) - y * $sin(ang), 2.0 * TOL);
      check("rot.y", fx2r(y_out), x * $sin(ang) + y * $cos(ang), 2.0 * TOL);
    end
    // vectoring: magnitude and angle in all quadrants
    for (int i = 0; i < 100; i++) begin
      mag = 0.1 + real'($urandom_range(0, 3000)) / 1000.0;
      ang = (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * (PI - 0.01);
      x = mag * $cos(ang);
      y = mag * $sin(ang);
      run(2'd1, x, y, 0.0);
      check("mag", fx2r(x_out), $sqrt(fx2r(x_in) * fx2r(x_in) + fx2r(y_in) * fx2r(y_in)), TOL);
      d = fx2r(z_out) - $atan2(fx2r(y_in), fx2r(x_in));
      check("angle", d, 0.0, TOL / mag + TOL);
    end
    // exponential
    for (int i = 0; i < 60; i++) begin
      z = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
      run(2'd2, 0.0, 0.0, z);
      check("exp", fx2r(x_out), $exp(fx2r(z_in)), 2.0 * TOL);
      check("exp-", fx2r(y_out), $exp(-fx2r(z_in)), 2.0 * TOL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
