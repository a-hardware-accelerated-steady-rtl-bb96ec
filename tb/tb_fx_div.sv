// tb_fx_div: self-checking testbench for the Newton-Raphson divider fx_div.
//
// Drives fixed cases (exact quotients, negative operands, a power-of-two
// divisor, division by zero) and random operands, and compares each quotient
// with a/b worked out in real arithmetic. The allowed error is one unit of
// the reciprocal's last place scaled by |a|, plus two units of the result.
// It also checks that `done` comes exactly NR_ITERS + 3 cycles after start.
module tb_fx_div;
  import fxp_pkg::*;

  localparam int unsigned NR_ITERS = 5;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fx_t  a, b, q;
  logic busy, done, dz;
  int   checks = 0, failures = 0;

  fx_div #(.NR_ITERS(NR_ITERS)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .q, .div_by_zero(dz));

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

  task automatic divide(input real ra, input real rb, input logic expect_dz);
    int cyc;
    real exp_q, tol;
    a = fx_t'($rtoi(ra * 65536.0));
    b = fx_t'($rtoi(rb * 65536.0));
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != (expect_dz ? 2 : NR_ITERS + 3)) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, NR_ITERS + 3);
    end
    checks++;
    if (expect_dz) begin
      if (!dz || q != (fx2r(a) < 0 ? FX_MIN : FX_MAX)) begin
        failures++;
        $display("division by zero not flagged: q=%h dz=%b", q, dz);
      end
    end else begin
      exp_q = fx2r(a) / fx2r(b);
      tol   = 1.5 / 65536.0;
      if (dz || (fx2r(q) - exp_q > tol) || (exp_q - fx2r(q) > tol)) begin
        failures++;
        $display("%f / %f = %f, expected %f", fx2r(a), fx2r(b), fx2r(q), exp_q);
      end
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    divide(1.0, 1.0, 1'b0);
    divide(6.0, 3.0, 1'b0);
    divide(-6.0, 4.0, 1'b0);
    divide(5.5, -0.25, 1'b0);
    divide(-0.6, -1.1, 1'b0);
    divide(1.0, 0.0039, 1'b0);
    divide(100.0, 64.0, 1'b0);
    divide(0.5, 0.0, 1'b1);
    divide(-0.5, 0.0, 1'b1);
    for (int i = 0; i < 300; i++) begin
      real ra, rb;
      ra = (real'($urandom_range(0, 2000000)) - 1000000.0) / 10000.0;
      rb = (real'($urandom_range(0, 64000)) + 250.0) / 1000.0;
      if ($urandom_range(0, 1) == 1) rb = -rb;
      divide(ra, rb, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
