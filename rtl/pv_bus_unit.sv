// pv_bus_unit: one Gauss-Seidel update of the voltage-controlled bus k.
//
// At a voltage-controlled bus the real power P and the voltage magnitude
// |V_spec| are fixed, while the reactive power Q and the phase angle are
// unknown. One update runs these stages, one after another:
//   1. POLAR : the cordic unit converts V_k to polar form and keeps its angle
//              d_k; it then raises e to ln|V_spec| and rotates that magnitude
//              by d_k, giving V_k^s = |V_spec| e^(j d_k), the present voltage
//              at its set-point magnitude.
//   2. ACC   : a cx_mac accumulates the injected current
//              I_k = sum_n Y_kn V_n over all buses, with V_k^s in place of V_k.
//   3. POWER : Q = Im(V_k^s conj(I_k)), clamped to the reactive power limits
//              [q_min, q_max]. `q_limited` records a clamp.
//   4. GS    : the regular-bus update (a pq_bus_unit) with P, the clamped Q
//              and V_k^s gives an intermediate voltage V'.
//   5. EXP   : the cordic unit takes the angle of V' and rotates |V_spec| by
//              it: V_k(new) = exp(ln|V_spec| + j angle(V')). If Q was
//              clamped, the bus cannot hold its set-point in this step: it
//              acts as a load bus with Q at the limit, V' is the result and
//              this stage is skipped.
// The stages and their order (polar conversion of V_k, accumulation, power,
// the regular-bus arithmetic, exponentiation) follow the solver's structure.
// This design's own choices: forming the power from the rectangular current
// sum, holding the magnitude as its natural log so that the new voltage is a
// complex exponential, one cordic unit shared by all its operations, and the
// handling of a clamped Q (the usual practice; the solver's description lists
// the reactive power limits as inputs but does not say how they act).
// Computing Q from the voltage at its set-point magnitude keeps the bus from
// switching between its two behaviours on alternate steps.
//
// Interface: `start` (one cycle, while idle) with all inputs held stable until
// `done`. `done` pulses with `v_new`, `q_calc` (the clamped Q used) and
// `q_limited` valid; they hold until the next start. `done` comes
// N_BUS + max(k, N_BUS-1-k) + NR_ITERS + 5*ITERS + 30 clock edges after the
// edge that takes `start` when Q is within its limits (142 cycles for bus 2
// of 5 with the default sizes), and 2*ITERS + 6 fewer (96) when it is
// clamped.
module pv_bus_unit
  import fxp_pkg::*;
#(
  parameter int unsigned N_BUS    = 5,
  parameter int unsigned NR_ITERS = 5,
  parameter int unsigned ITERS    = 20,
  localparam int unsigned IW      = $clog2(N_BUS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] bus_idx,
  input  cplx_t         y_row [N_BUS],
  input  cplx_t         inv_ykk,
  input  fx_t           p,
  input  fx_t           q_min,
  input  fx_t           q_max,
  input  fx_t           ln_vmag,
  input  cplx_t         v     [N_BUS],
  output logic          busy,
  output logic          done,
  output cplx_t         v_new,
  output fx_t           q_calc,
  output logic          q_limited
);

  localparam logic [1:0] CORDIC_ROTATE = 2'd0;
  localparam logic [1:0] CORDIC_VECTOR = 2'd1;
  localparam logic [1:0] CORDIC_EXP    = 2'd2;

  typedef enum logic [4:0] {
    S_IDLE, S_POL_GO, S_POL, S_EXP_GO, S_EXP, S_SET_GO, S_SET, S_ACC_GO, S_ACC,
    S_POWER, S_GS_GO, S_GS, S_ANG_GO, S_ANG, S_ROT_GO, S_ROT, S_DONE
  } state_e;
  state_e state;

  logic  mac_busy, mac_done;
  cplx_t i_k;
  logic  gs_busy, gs_done;
  cplx_t v_gs;
  logic  cd_start, cd_busy, cd_done;
  logic [1:0] cd_mode;
  fx_t   cd_x, cd_y, cd_z, cd_xo, cd_yo, cd_zo;
  fx_t   delta_k, mag;
  cplx_t vs_k;
  cplx_t v_s [N_BUS];
  fx_t   q_raw;

  // Voltage vector with bus k at its set-point magnitude.
  always_comb begin
    for (int n = 0; n < N_BUS; n++) v_s[n] = (IW'(n) == bus_idx) ? vs_k : v[n];
  end

  cx_mac #(.N_BUS(N_BUS)) u_acc (
    .clk, .rst_n, .start(state == S_ACC_GO), .lo('0), .hi(IW'(N_BUS)),
    .y_row, .v(v_s), .busy(mac_busy), .done(mac_done), .acc(i_k)
  );

  pq_bus_unit #(.N_BUS(N_BUS), .NR_ITERS(NR_ITERS)) u_gs (
    .clk, .rst_n, .start(state == S_GS_GO), .bus_idx, .y_row, .inv_ykk,
    .p, .q(q_calc), .v(v_s), .busy(gs_busy), .done(gs_done), .v_new(v_gs)
  );

  always_comb begin
    cd_start = 1'b0;
    cd_mode  = CORDIC_VECTOR;
    cd_x     = v[bus_idx].re;
    cd_y     = v[bus_idx].im;
    cd_z     = '0;
    unique case (state)
      S_POL_GO: cd_start = 1'b1;
      S_EXP_GO: begin
        cd_start = 1'b1;
        cd_mode  = CORDIC_EXP;
        cd_x     = '0;
        cd_y     = '0;
        cd_z     = ln_vmag;
      end
      S_SET_GO: begin
        cd_start = 1'b1;
        cd_mode  = CORDIC_ROTATE;
        cd_x     = mag;
        cd_y     = '0;
        cd_z     = delta_k;
      end
      S_ANG_GO: begin
        cd_start = 1'b1;
        cd_x     = v_gs.re;
        cd_y     = v_gs.im;
      end
      S_ROT_GO: begin
        cd_start = 1'b1;
        cd_mode  = CORDIC_ROTATE;
        cd_x     = mag;
        cd_y     = '0;
        cd_z     = delta_k;
      end
      default: ;
    endcase
  end

  cordic #(.ITERS(ITERS)) u_cordic (
    .clk, .rst_n, .start(cd_start), .mode(cd_mode),
    .x_in(cd_x), .y_in(cd_y), .z_in(cd_z),
    .busy(cd_busy), .done(cd_done), .x_out(cd_xo), .y_out(cd_yo), .z_out(cd_zo)
  );

  // Q = Im(V_k^s conj(I_k)) = V.im * I.re - V.re * I.im
  assign q_raw = fx_mul(vs_k.im, i_k.re) - fx_mul(vs_k.re, i_k.im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      q_calc    <= '0;
      q_limited <= 1'b0;
      delta_k   <= '0;
      mag       <= '0;
      vs_k      <= '0;
      v_new     <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (start) state <= S_POL_GO;
        S_POL_GO: state <= S_POL;
        S_POL: if (cd_done) begin
          delta_k <= cd_zo;
          state   <= S_EXP_GO;
        end
        S_EXP_GO: state <= S_EXP;
        S_EXP: if (cd_done) begin
          mag   <= cd_xo;
          state <= S_SET_GO;
        end
        S_SET_GO: state <= S_SET;
        S_SET: if (cd_done) begin
          vs_k  <= cx_make(cd_xo, cd_yo);
          state <= S_ACC_GO;
        end
        S_ACC_GO: state <= S_ACC;
        S_ACC:    if (mac_done) state <= S_POWER;
        S_POWER: begin
          if (q_raw > q_max) begin
            q_calc    <= q_max;
            q_limited <= 1'b1;
          end else if (q_raw < q_min) begin
            q_calc    <= q_min;
            q_limited <= 1'b1;
          end else begin
            q_calc    <= q_raw;
            q_limited <= 1'b0;
          end
          state <= S_GS_GO;
        end
        S_GS_GO: state <= S_GS;
        S_GS: if (gs_done) begin
          if (q_limited) begin
            v_new <= v_gs;
            state <= S_DONE;
          end else begin
            state <= S_ANG_GO;
          end
        end
        S_ANG_GO: state <= S_ANG;
        S_ANG: if (cd_done) begin
          delta_k <= cd_zo;
          state   <= S_ROT_GO;
        end
        S_ROT_GO: state <= S_ROT;
        S_ROT: if (cd_done) begin
          v_new <= cx_make(cd_xo, cd_yo);
          state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

endmodule
