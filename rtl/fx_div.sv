// fx_div: multi-cycle Q16.16 divider built on a Newton-Raphson reciprocal.
//
// The quotient a/b is formed as a * (1/b). The reciprocal of |b| is found by
// Newton-Raphson iteration, x <- x * (2 - |b| * x), which doubles the number
// of correct bits per step. The seed is a single 1 bit: if the most
// significant 1 of |b| sits at bit position p of the 32-bit word, the seed is
// a 1 at position 32 - p - 1. (For |b| = ...0000010111011..., with its leading
// 1 at position 27, the seed is a 1 at position 4.) Read as a Q16.16 number
// that seed is within a factor of two of 1/|b| and never above it, so the
// iteration starts inside its convergence region and rises monotonically to
// 1/|b|. The seed rule is the one the solver was specified with; the number
// of iterations (NR_ITERS = 5, enough for a worst-case seed error of 1/2 to
// fall below 2^-32), holding the reciprocal with 32 fractional bits rather
// than 16 (so that a large divisor keeps its precision), round-to-nearest on
// the final product and saturation on overflow and division by zero are this
// design's choices.
//
// Interface: pulse `start` for one cycle while idle, with `a` and `b` valid.
// `done` is high for one cycle NR_ITERS + 3 clock edges after the edge that
// takes `start` (2 edges when b = 0), with `q` (held until the next start)
// and `div_by_zero`. `busy` is high in between.
module fx_div
  import fxp_pkg::*;
#(
  parameter int unsigned NR_ITERS = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  a,
  input  fx_t  b,
  output logic busy,
  output logic done,
  output fx_t  q,
  output logic div_by_zero
);

  localparam int unsigned RF = 32;   // fractional bits of the reciprocal

  typedef enum logic [2:0] {S_IDLE, S_SEED, S_ITER, S_MUL, S_DONE} state_e;
  state_e state;

  logic [63:0] d_mag;   // |b|, raw Q16.16
  logic [63:0] n_mag;   // |a|, raw Q16.16
  logic [63:0] x;       // reciprocal estimate, RF fractional bits
  logic        neg;
  logic [$clog2(NR_ITERS+1)-1:0] cnt;

  // Position of the most significant 1 of the divisor magnitude.
  function automatic int unsigned msb_pos(logic [31:0] val);
    int unsigned pos;
    pos = 0;
    for (int i = 0; i < 32; i++) begin
      if (val[i]) pos = i;
    end
    return pos;
  endfunction

  localparam logic [127:0] TWO = 128'd2 << RF;

  logic [127:0] dx;     // |b| * x, RF fractional bits
  logic [127:0] x_next;
  logic [127:0] qmag;
  always_comb begin
    dx     = (128'(d_mag) * 128'(x)) >> FX_FRAC;
    x_next = (128'(x) * (TWO - dx)) >> RF;
    qmag   = (128'(n_mag) * 128'(x) + (128'd1 << (RF - 1))) >> RF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      d_mag       <= '0;
      n_mag       <= '0;
      x           <= '0;
      neg         <= 1'b0;
      cnt         <= '0;
      q           <= '0;
      div_by_zero <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          neg   <= a[FX_W-1] ^ b[FX_W-1];
          n_mag <= a[FX_W-1] ? -64'(a) : 64'(a);
          d_mag <= b[FX_W-1] ? -64'(b) : 64'(b);
          state <= S_SEED;
        end
        S_SEED: begin
          cnt <= '0;
          if (d_mag == 64'd0) begin
            div_by_zero <= 1'b1;
            q           <= neg ? FX_MIN : FX_MAX;
            state       <= S_DONE;
          end else begin
            div_by_zero <= 1'b0;
            x           <= 64'd1 << (31 - msb_pos(d_mag[31:0]) + RF - FX_FRAC);
            state       <= S_ITER;
          end
        end
        S_ITER: begin
          x   <= x_next[63:0];
          cnt <= cnt + 1'b1;
          if (32'(cnt) == NR_ITERS - 1) state <= S_MUL;
        end
        S_MUL: begin
          if (qmag > 128'h7FFF_FFFF) q <= neg ? FX_MIN : FX_MAX;
          else                      q <= neg ? -fx_t'(qmag[31:0]) : fx_t'(qmag[31:0]);
          state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

endmodule
