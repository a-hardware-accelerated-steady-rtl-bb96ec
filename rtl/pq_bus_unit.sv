// pq_bus_unit: one Gauss-Seidel voltage update of a regular (load) bus k.
//
//   V_k(new) = (1 / Y_kk) * ( (P_k - jQ_k) / conj(V_k)
//                             - sum_{n<k} Y_kn V_n - sum_{n>k} Y_kn V_n )
//
// The update runs as four stages in sequence, which is the structure the
// solver gives for a regular bus:
//   1. MAC   : two cx_mac units in parallel, one over the buses numbered below
//              k ("buses < me") and one over those above it ("buses > me").
//   2. DIV   : cx_div divides the complex power conjugate by conj(V_k).
//   3. SUB   : subtract both accumulators from the quotient.
//   4. MUL   : multiply by the precomputed 1/Y_kk to give the new voltage.
// The power term is P - jQ (the usual sign for the injected power); 1/Y_kk
// comes in as a constant so that the last stage is a multiply, not a divide.
// The handshake and the stage registers are this design's.
//
// Interface: `start` (one cycle, while idle) with `bus_idx`, `y_row` (row k of
// the admittance matrix), `inv_ykk`, `p`, `q` and the voltage vector `v` held
// stable until `done`. `done` pulses with `v_new` valid; `v_new` holds until
// the next start. `done` comes max(k, N_BUS-1-k) + NR_ITERS + 8 clock edges
// after the edge that takes `start`: 16 or 17 cycles for the default sizes.
module pq_bus_unit
  import fxp_pkg::*;
#(
  parameter int unsigned N_BUS    = 5,
  parameter int unsigned NR_ITERS = 5,
  localparam int unsigned IW      = $clog2(N_BUS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] bus_idx,
  input  cplx_t         y_row [N_BUS],
  input  cplx_t         inv_ykk,
  input  fx_t           p,
  input  fx_t           q,
  input  cplx_t         v     [N_BUS],
  output logic          busy,
  output logic          done,
  output cplx_t         v_new
);

  typedef enum logic [2:0] {S_IDLE, S_MAC, S_DIV_GO, S_DIV, S_MUL, S_DONE} state_e;
  state_e state;

  logic  mac_start, div_start;
  logic  lo_busy, lo_done, hi_busy, hi_done, lo_seen, hi_seen;
  cplx_t acc_lo, acc_hi;
  logic  div_busy, div_done, div_dz;
  cplx_t div_q;
  cplx_t diff;

  assign mac_start = (state == S_IDLE) && start;
  assign div_start = (state == S_DIV_GO);

  cx_mac #(.N_BUS(N_BUS)) u_mac_lo (
    .clk, .rst_n, .start(mac_start), .lo('0), .hi(bus_idx),
    .y_row, .v, .busy(lo_busy), .done(lo_done), .acc(acc_lo)
  );

  cx_mac #(.N_BUS(N_BUS)) u_mac_hi (
    .clk, .rst_n, .start(mac_start), .lo(bus_idx + 1'b1), .hi(IW'(N_BUS)),
    .y_row, .v, .busy(hi_busy), .done(hi_done), .acc(acc_hi)
  );

  cx_div #(.NR_ITERS(NR_ITERS)) u_div (
    .clk, .rst_n, .start(div_start),
    .a(cx_make(p, -q)), .b(cx_conj(v[bus_idx])),
    .busy(div_busy), .done(div_done), .q(div_q), .div_by_zero(div_dz)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      lo_seen <= 1'b0;
      hi_seen <= 1'b0;
      diff    <= '0;
      v_new   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          lo_seen <= 1'b0;
          hi_seen <= 1'b0;
          state   <= S_MAC;
        end
        S_MAC: begin
          if (lo_done) lo_seen <= 1'b1;
          if (hi_done) hi_seen <= 1'b1;
          if ((lo_seen || lo_done) && (hi_seen || hi_done)) state <= S_DIV_GO;
        end
        S_DIV_GO: state <= S_DIV;
        S_DIV: if (div_done) begin
          diff  <= cx_sub(cx_sub(div_q, acc_lo), acc_hi);
          state <= S_MUL;
        end
        S_MUL: begin
          v_new <= cx_mul(diff, inv_ykk);
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
