// tb_cx_mac: self-checking testbench for the complex multiply-and-add cx_mac.
//
// Loads random complex rows and voltage vectors, runs every index range
// [lo, hi) of a 5-bus vector (the empty ones included) and compares the sum
// with the same sum in real arithmetic. It checks that a range of c products
// takes c + 1 cycles (1 for an empty range).
module tb_cx_mac;
  import fxp_pkg::*;

  localparam int unsigned N = 5;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] lo, hi;
  cplx_t y_row [N];
  cplx_t v [N];
  cplx_t acc;
  logic busy, done;
  int checks = 0, failures = 0;

  cx_mac #(.N_BUS(N)) dut (.clk, .rst_n, .start, .lo, .hi, .y_row, .v, .busy, .done, .acc);

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
  function automatic fx_t rnd(real range);
    return fx_t'($rtoi((real'($urandom_range(0, 200000)) / 100000.0 - 1.0) * range * 65536.0));
  endfunction

  initial begin
    real er, ei, tol;
    int cyc, c;
    lo = '0; hi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < N; n++) begin
        y_row[n] = cx_make(rnd(30.0), rnd(30.0));
        v[n]     = cx_make(rnd(1.5), rnd(1.5));
      end
      for (int l = 0; l <= N; l++) begin
        for (int h = 0; h <= N; h++) begin
          lo = 3'(l); hi = 3'(h);
          @(negedge clk) start = 1'b1;
          @(negedge clk) start = 1'b0;
          cyc = 1;
          while (!done) begin
            @(negedge clk);
            cyc++;
          end
          er = 0.0; ei = 0.0;
          for (int n = l; n < h; n++) begin
            er += fx2r(y_row[n].re) * fx2r(v[n].re) - fx2r(y_row[n].im) * fx2r(v[n].im);
            ei += fx2r(y_row[n].re) * fx2r(v[n].im) + fx2r(y_row[n].im) * fx2r(v[n].re);
          end
          c   = (h > l) ? h - l : 0;
          tol = (2.0 * c + 0.5) / 65536.0;
          checks += 3;
          if (rabs(fx2r(acc.re) - er) > tol || rabs(fx2r(acc.im) - ei) > tol) begin
            failures++;
            $display("[%0d,%0d) got (%f, %f) expected (%f, %f)", l, h, fx2r(acc.re), fx2r(acc.im), er, ei);
          end
          if (c == 0 && acc != '0) failures++;
          if (cyc != c + 1) begin
            failures++;
            $display("[%0d,%0d) latency %0d", l, h, cyc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
