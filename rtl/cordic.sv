// cordic: iterative CORDIC unit for sines/cosines, rectangular <-> polar
// conversion and the exponential, all in Q16.16 at the ports.
//
// One shift-and-add micro-rotation is done per clock cycle. Three modes:
//   CORDIC_ROTATE : rotate (x_in, y_in) by the angle z_in (radians, |z| <= pi).
//                   x_out + j y_out = (x_in + j y_in) * e^(j z_in). With
//                   (x_in, y_in) = (1, 0) this gives cos and sin, i.e. the
//                   polar -> rectangular conversion.
//   CORDIC_VECTOR : drive (x_in, y_in) onto the x axis. x_out = |x_in + j y_in|,
//                   z_out = atan2(y_in, x_in): rectangular -> polar.
//   CORDIC_EXP    : hyperbolic rotation of (1, 0) by z_in (|z_in| < 1.118),
//                   x_out = e^z_in, y_out = e^-z_in.
// Circular modes first fold the input into the right half-plane by a quarter
// turn, so the full circle is covered. The hyperbolic mode repeats steps 4
// and 13, as hyperbolic CORDIC needs to converge. The CORDIC gain is removed
// with one multiply at the end, so no pre-scaled inputs are needed.
// That sines, cosines, polar conversion and the exponential are all done by
// CORDIC follows the solver's description; the iteration count (ITERS = 20),
// the 8 guard bits (24 fractional bits inside), the folding and the shared
// single unit with a mode input are this design's choices. The constant
// tables are round(atan(2^-i) * 2^24) and round(atanh(2^-k) * 2^24); the gain
// corrections are round(2^24 / prod sqrt(1 + 2^-2i)) and
// round(2^24 / prod sqrt(1 - 2^-2k)) over the steps taken.
//
// Interface: pulse `start` while idle with the inputs and `mode` valid. `done`
// is high ITERS + 2 clock edges after the edge that takes `start` (ITERS + 4
// for CORDIC_EXP) with the outputs
// valid; they hold until the next start.
module cordic
  import fxp_pkg::*;
#(
  parameter int unsigned ITERS = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [1:0] mode,
  input  fx_t  x_in,
  input  fx_t  y_in,
  input  fx_t  z_in,
  output logic busy,
  output logic done,
  output fx_t  x_out,
  output fx_t  y_out,
  output fx_t  z_out
);

  localparam logic [1:0] CORDIC_ROTATE = 2'd0;
  localparam logic [1:0] CORDIC_VECTOR = 2'd1;
  localparam logic [1:0] CORDIC_EXP    = 2'd2;

  localparam int unsigned G  = 8;               // guard bits
  localparam int unsigned IF = FX_FRAC + G;     // internal fraction bits
  localparam int unsigned IWD = 48;             // internal width
  typedef logic signed [IWD-1:0] int_t;

  localparam int_t HALF_PI = int_t'(26353589);
  localparam int_t INV_K   = int_t'(10188014);   // 1/1.646760258
  localparam int_t INV_KH  = int_t'(20258439);   // 1/0.828159361

  initial begin
    assert (ITERS >= 16 && ITERS <= 22)
      else $error("cordic: ITERS must lie in 16..22 for the built-in gain constants");
  end

  function automatic int_t atan_tab(int unsigned i);
    case (i)
      0: return 13176795;  1: return 7778716;  2: return 4110060;  3: return 2086331;
      4: return 1047214;   5: return 524117;   6: return 262123;   7: return 131069;
      default: return int_t'(64'sd1 <<< (IF - i));   // atan(2^-i) ~ 2^-i below 2^-8
    endcase
  endfunction

  function automatic int_t atanh_tab(int unsigned k);
    case (k)
      1: return 9215828;   2: return 4285116;  3: return 2108178;  4: return 1049945;
      5: return 524459;    6: return 262165;   7: return 131075;
      default: return int_t'(64'sd1 <<< (IF - k));
    endcase
  endfunction

  // Shift amount of hyperbolic step s: 1,2,3,4,4,5,...,13,13,14,...
  function automatic int unsigned hyp_shift(int unsigned s);
    int unsigned k;
    k = s + 1;
    if (s >= 4)  k = k - 1;
    if (s >= 14) k = k - 1;
    return k;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SCALE, S_DONE} state_e;
  state_e state;
  logic [1:0] md;
  int_t x, y, z;
  logic [4:0] step;
  logic [4:0] last_step;

  function automatic int_t widen(fx_t val);
    return int_t'(val) <<< G;
  endfunction

  function automatic fx_t narrow(int_t val);
    int_t r;
    r = (val + (int_t'(1) <<< (G - 1))) >>> G;
    return fx_t'(r[FX_W-1:0]);
  endfunction

  function automatic int_t imul(int_t a, int_t b);
    logic signed [2*IWD-1:0] prod;
    prod = (2*IWD)'(a) * (2*IWD)'(b);
    prod = prod + ((2*IWD)'(1) <<< (IF - 1));
    return int_t'(prod >>> IF);
  endfunction

  // One micro-rotation.
  int_t xs, ys, xn, yn, zn, ang;
  logic dir;    // 1: rotate by +angle
  int unsigned sh;
  always_comb begin
    sh  = (md == CORDIC_EXP) ? hyp_shift(32'(step)) : 32'(step);
    ang = (md == CORDIC_EXP) ? atanh_tab(sh) : atan_tab(sh);
    xs  = x >>> sh;
    ys  = y >>> sh;
    dir = (md == CORDIC_VECTOR) ? y[IWD-1] : !z[IWD-1];
    if (md == CORDIC_EXP) begin
      xn = dir ? x + ys : x - ys;
      yn = dir ? y + xs : y - xs;
    end else begin
      xn = dir ? x - ys : x + ys;
      yn = dir ? y + xs : y - xs;
    end
    zn = dir ? z - ang : z + ang;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      md    <= CORDIC_ROTATE;
      x <= '0; y <= '0; z <= '0;
      step <= '0;
      last_step <= '0;
      x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          md    <= mode;
          step  <= '0;
          state <= S_RUN;
          last_step <= (mode == CORDIC_EXP) ? 5'(ITERS + 1) : 5'(ITERS - 1);
          case (mode)
            CORDIC_EXP: begin
              x <= INV_KH; y <= '0; z <= widen(z_in);
            end
            CORDIC_VECTOR: begin
              if (x_in[FX_W-1]) begin
                if (!y_in[FX_W-1]) begin   // quadrant II: turn by -pi/2
                  x <= widen(y_in); y <= -widen(x_in); z <= HALF_PI;
                end else begin             // quadrant III: turn by +pi/2
                  x <= -widen(y_in); y <= widen(x_in); z <= -HALF_PI;
                end
              end else begin
                x <= widen(x_in); y <= widen(y_in); z <= '0;
              end
            end
            default: begin                 // rotate
              if (widen(z_in) > HALF_PI) begin
                x <= -widen(y_in); y <= widen(x_in); z <= widen(z_in) - HALF_PI;
              end else if (widen(z_in) < -HALF_PI) begin
                x <= widen(y_in); y <= -widen(x_in); z <= widen(z_in) + HALF_PI;
              end else begin
                x <= widen(x_in); y <= widen(y_in); z <= widen(z_in);
              end
            end
          endcase
        end
        S_RUN: begin
          x <= xn; y <= yn; z <= zn;
          step <= step + 1'b1;
          if (step == last_step) state <= S_SCALE;
        end
        S_SCALE: begin
          if (md == CORDIC_EXP) begin
            x_out <= narrow(x + y);          // cosh + sinh
            y_out <= narrow(x - y);          // cosh - sinh
            z_out <= narrow(z);
          end else begin
            x_out <= narrow(imul(x, INV_K));
            y_out <= narrow(imul(y, INV_K));
            z_out <= narrow(z);
          end
          state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN) || (state == S_SCALE);
  assign done = (state == S_DONE);

endmodule
