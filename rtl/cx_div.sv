// cx_div: multi-cycle complex divider, q = a / b, in Q16.16.
//
// The division is reduced to real operations: q = a * conj(b) / |b|^2. The
// numerator a * conj(b) and the squared magnitude |b|^2 are formed in the
// first cycle with the shared fixed-point multiply, and then two fx_div
// Newton-Raphson dividers run side by side on the real and imaginary parts.
// In the regular-bus datapath this is the "divide by complex conjugate" step,
// (P - jQ) / conj(V). The use of two dividers in parallel rather than one
// shared divider is this design's choice.
//
// Interface: pulse `start` while idle with `a` and `b` valid; `done` pulses
// LATENCY = NR_ITERS + 4 cycles later with `q` valid (held until the next
// start). `div_by_zero` is set when |b|^2 rounds to zero.
module cx_div
  import fxp_pkg::*;
#(
  parameter int unsigned NR_ITERS = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t a,
  input  cplx_t b,
  output logic  busy,
  output logic  done,
  output cplx_t q,
  output logic  div_by_zero
);

  cplx_t num;
  fx_t   den;
  logic  go;
  logic  busy_re, busy_im, done_re, done_im, dz_re, dz_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num <= '0;
      den <= '0;
      go  <= 1'b0;
    end else begin
      go <= start && !busy;
      if (start && !busy) begin
        num <= cx_mul(a, cx_conj(b));
        den <= fx_mul(b.re, b.re) + fx_mul(b.im, b.im);
      end
    end
  end

  fx_div #(.NR_ITERS(NR_ITERS)) u_div_re (
    .clk, .rst_n, .start(go), .a(num.re), .b(den),
    .busy(busy_re), .done(done_re), .q(q.re), .div_by_zero(dz_re)
  );

  fx_div #(.NR_ITERS(NR_ITERS)) u_div_im (
    .clk, .rst_n, .start(go), .a(num.im), .b(den),
    .busy(busy_im), .done(done_im), .q(q.im), .div_by_zero(dz_im)
  );

  assign busy        = go | busy_re | busy_im;
  assign done        = done_re & done_im;
  assign div_by_zero = dz_re | dz_im;

endmodule
