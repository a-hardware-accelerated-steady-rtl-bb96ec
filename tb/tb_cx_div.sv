// tb_cx_div: self-checking testbench for the complex divider cx_div.
//
// Divides random complex numbers (divisor magnitudes 0.3 to 3, the range
// bus voltages live in) and a few fixed cases, including the power term over
// a conjugated voltage as the regular-bus update uses it, and compares with
// complex division in real arithmetic. It checks the NR_ITERS + 4 cycle
// latency and the division-by-zero flag.
module tb_cx_div;
  import fxp_pkg::*;

  localparam int unsigned NR_ITERS = 5;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cplx_t a, b, q;
  logic busy, done, dz;
  int checks = 0, failures = 0;

  cx_div #(.NR_ITERS(NR_ITERS)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .q, .div_by_zero(dz));

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

  task automatic divide(input real ar, input real ai, input real br, input real bi, input logic zero);
    int cyc;
    real d, er, ei, tol;
    a = cx_make(r2fx(ar), r2fx(ai));
    b = cx_make(r2fx(br), r2fx(bi));
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (zero) begin
      if (!dz) begin
        failures++;
        $display("division by zero not flagged");
      end
      if (cyc != 3) failures++;
    end else begin
      d  = fx2r(b.re) * fx2r(b.re) + fx2r(b.im) * fx2r(b.im);
      er = (fx2r(a.re) * fx2r(b.re) + fx2r(a.im) * fx2r(b.im)) / d;
      ei = (fx2r(a.im) * fx2r(b.re) - fx2r(a.re) * fx2r(b.im)) / d;
      // |b|^2 is rounded to 2^-16 before the division
      tol = (4.0 + 2.0 * (rabs(er) + rabs(ei)) / d) / 65536.0;
      if (dz || rabs(fx2r(q.re) - er) > tol || rabs(fx2r(q.im) - ei) > tol) begin
        failures++;
        $display("((%f, %f))/((%f, %f)) = (%f, %f) expected (%f, %f)", ar, ai, br, bi,
                 fx2r(q.re), fx2r(q.im), er, ei);
      end
      if (cyc != NR_ITERS + 4) begin
        failures++;
        $display("latency %0d", cyc);
      end
    end
  endtask

  initial begin
    real m, ph;
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    divide(1.0, 0.0, 1.0, 0.0, 1'b0);
    divide(0.0, 1.0, 0.0, 1.0, 1'b0);
    divide(2.0, 2.0, 1.0, -1.0, 1'b0);
    divide(-0.6, 0.2, 0.98, 0.1, 1'b0);
    divide(1.0, 1.0, 0.0, 0.0, 1'b1);
    for (int i = 0; i < 300; i++) begin
      m  = 0.3 + real'($urandom_range(0, 2700)) / 1000.0;
      ph = real'($urandom_range(0, 6283)) / 1000.0;
      divide(real'($urandom_range(0, 8000)) / 1000.0 - 4.0,
             real'($urandom_range(0, 8000)) / 1000.0 - 4.0,
             m * $cos(ph), m * $sin(ph), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
