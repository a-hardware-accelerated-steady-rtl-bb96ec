// gs_solver: fixed-point Gauss-Seidel power-flow solver for a small grid.
//
// The solver finds the steady-state complex voltage at every bus of a power
// grid. Bus SWING_BUS is the reference (voltage fixed at 1.0 at angle 0),
// bus PV_BUS is voltage-controlled (real power and voltage magnitude fixed)
// and every other bus is a regular load bus (real and reactive power fixed).
// All the constants of the problem (admittance matrix, 1/Y_kk, powers,
// reactive power limits, the magnitude of the voltage-controlled bus and the
// initial voltages) are parameters, fixed when the design is built, and
// every number is Q16.16 fixed point.
//
// After `start`, the solver copies the initial voltages out of init_rom into
// its voltage registers, then runs N_ITER iteration steps. In each step the
// voltage-controlled bus unit (pv_bus_unit) and one regular bus unit
// (pq_bus_unit) per load bus all start together and work in parallel, each
// from the voltages at the start of the step. When the last unit is done,
// all new voltages are written back at once and the next step starts. The
// swing bus is never updated. `done` then pulses, and `v_out` holds the
// solution until the next start.
//
// What follows the solver's description: the 5-bus problem with one swing,
// one voltage-controlled and three load buses, the Q16.16 format, constants
// fixed at build time, initial values from a ROM, a dense admittance matrix,
// and parallel regular-bus updates alongside the voltage-controlled one.
// This design's choices: the numbers of the default grid (line impedances,
// loads, limits), the fixed iteration count N_ITER = 100 with no convergence
// test, and writing all voltages back at the end of a step (so within a step
// every unit sees the previous step's voltages, a Jacobi-style sweep).
//
// Interface: `start` is taken while idle. `busy` is high until `done`
// pulses. `iter_count` counts finished steps, `cycle_count` counts the
// cycles of the run, `q_pv` and `q_limited` give the reactive power of the
// voltage-controlled bus and whether it was clamped in the last step, and
// `limit_hits` counts the steps in which it was clamped.
module gs_solver
  import fxp_pkg::*;
#(
  parameter int unsigned N_BUS        = 5,
  parameter int unsigned SWING_BUS    = 0,
  parameter int unsigned PV_BUS       = 2,
  parameter int unsigned N_ITER       = 100,
  parameter int unsigned NR_ITERS     = 5,
  parameter int unsigned CORDIC_ITERS = 20,
  // Admittance matrix Y (dense), row k = bus k.
  parameter cplx_t Y_MATRIX [N_BUS][N_BUS] = '{
    '{'{ 32'sd327680, -32'sd983040}, '{32'sd0, 32'sd0}, '{32'sd0, 32'sd0},
      '{-32'sd327680,  32'sd983040}, '{32'sd0, 32'sd0}},
    '{'{32'sd0, 32'sd0}, '{ 32'sd382293, -32'sd1146880}, '{32'sd0, 32'sd0},
      '{-32'sd218453,  32'sd655360}, '{-32'sd163840, 32'sd491520}},
    '{'{32'sd0, 32'sd0}, '{32'sd0, 32'sd0}, '{ 32'sd327680, -32'sd983040},
      '{32'sd0, 32'sd0}, '{-32'sd327680, 32'sd983040}},
    '{'{-32'sd327680, 32'sd983040}, '{-32'sd218453, 32'sd655360}, '{32'sd0, 32'sd0},
      '{ 32'sd677205, -32'sd2031616}, '{-32'sd131072, 32'sd393216}},
    '{'{32'sd0, 32'sd0}, '{-32'sd163840, 32'sd491520}, '{-32'sd327680, 32'sd983040},
      '{-32'sd131072, 32'sd393216}, '{ 32'sd622592, -32'sd1867776}}},
  // 1 / Y_kk for every bus.
  parameter cplx_t INV_YKK [N_BUS] = '{
    '{32'sd1311, 32'sd3932}, '{32'sd1123, 32'sd3370}, '{32'sd1311, 32'sd3932},
    '{32'sd634, 32'sd1903}, '{32'sd690, 32'sd2070}},
  // Scheduled injected real and reactive power (negative = load).
  parameter fx_t P_SPEC [N_BUS] = '{32'sd0, -32'sd39322, 32'sd26214, -32'sd29491, -32'sd26214},
  parameter fx_t Q_SPEC [N_BUS] = '{32'sd0, -32'sd13107, 32'sd0, -32'sd9830, -32'sd3277},
  // Reactive power limits and ln|V| of the voltage-controlled bus.
  parameter fx_t Q_MIN   = -32'sd19661,
  parameter fx_t Q_MAX   =  32'sd32768,
  parameter fx_t LN_VMAG =  32'sd1298,
  parameter cplx_t V_INIT [N_BUS] = '{
    '{32'sd65536, 32'sd0}, '{32'sd65536, 32'sd0}, '{32'sd66847, 32'sd0},
    '{32'sd65536, 32'sd0}, '{32'sd65536, 32'sd0}},
  localparam int unsigned IW = $clog2(N_BUS + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output cplx_t       v_out [N_BUS],
  output logic [15:0] iter_count,
  output logic [31:0] cycle_count,
  output fx_t         q_pv,
  output logic        q_limited,
  output logic [15:0] limit_hits
);

  // The k-th load bus (every bus that is neither swing nor voltage-controlled).
  function automatic int unsigned pq_bus(int unsigned k);
    int unsigned cnt;
    int unsigned r;
    cnt = 0;
    r   = 0;
    for (int unsigned b = 0; b < N_BUS; b++) begin
      if (b != SWING_BUS && b != PV_BUS) begin
        if (cnt == k) r = b;
        cnt++;
      end
    end
    return r;
  endfunction

  localparam int unsigned N_PQ = N_BUS - 2;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STEP_GO, S_STEP, S_WRITE, S_DONE} state_e;
  state_e state;

  cplx_t v [N_BUS];
  logic [IW-1:0] rom_addr;
  cplx_t rom_data;
  logic  load_wr;
  logic [IW-1:0] load_idx;

  logic step_go;
  assign step_go = (state == S_STEP_GO) && !load_wr;

  init_rom #(.N_BUS(N_BUS), .V_INIT(V_INIT)) u_rom (
    .clk, .addr(rom_addr), .data(rom_data)
  );

  // Voltage-controlled bus.
  logic  pv_busy, pv_done, pv_seen, pv_lim;
  cplx_t pv_v;
  fx_t   pv_q;

  pv_bus_unit #(.N_BUS(N_BUS), .NR_ITERS(NR_ITERS), .ITERS(CORDIC_ITERS)) u_pv (
    .clk, .rst_n, .start(step_go), .bus_idx(IW'(PV_BUS)),
    .y_row(Y_MATRIX[PV_BUS]), .inv_ykk(INV_YKK[PV_BUS]), .p(P_SPEC[PV_BUS]),
    .q_min(Q_MIN), .q_max(Q_MAX), .ln_vmag(LN_VMAG), .v,
    .busy(pv_busy), .done(pv_done), .v_new(pv_v), .q_calc(pv_q), .q_limited(pv_lim)
  );

  // Regular (load) buses, all in parallel.
  logic  [N_PQ-1:0] pq_busy, pq_done, pq_seen;
  cplx_t pq_v [N_PQ];

  for (genvar g = 0; g < N_PQ; g++) begin : g_pq
    localparam int unsigned K = pq_bus(g);
    pq_bus_unit #(.N_BUS(N_BUS), .NR_ITERS(NR_ITERS)) u_pq (
      .clk, .rst_n, .start(step_go), .bus_idx(IW'(K)),
      .y_row(Y_MATRIX[K]), .inv_ykk(INV_YKK[K]), .p(P_SPEC[K]), .q(Q_SPEC[K]),
      .v, .busy(pq_busy[g]), .done(pq_done[g]), .v_new(pq_v[g])
    );
  end

  logic all_done;
  assign all_done = (pv_seen || pv_done) && (&(pq_seen | pq_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rom_addr    <= '0;
      load_wr     <= 1'b0;
      load_idx    <= '0;
      pv_seen     <= 1'b0;
      pq_seen     <= '0;
      iter_count  <= '0;
      cycle_count <= '0;
      q_pv        <= '0;
      q_limited   <= 1'b0;
      limit_hits  <= '0;
      for (int i = 0; i < N_BUS; i++) v[i] <= '0;
    end else begin
      // ROM read data arrives one cycle after its address.
      load_wr  <= (state == S_LOAD);
      load_idx <= rom_addr;
      if (load_wr) v[load_idx] <= rom_data;
      if (state != S_IDLE && state != S_DONE) cycle_count <= cycle_count + 1'b1;

      unique case (state)
        S_IDLE: if (start) begin
          rom_addr    <= '0;
          iter_count  <= '0;
          cycle_count <= '0;
          limit_hits  <= '0;
          state       <= S_LOAD;
        end
        S_LOAD: begin
          rom_addr <= rom_addr + 1'b1;
          if (rom_addr == IW'(N_BUS - 1)) state <= S_STEP_GO;
        end
        S_STEP_GO: begin
          // Wait for the last ROM word to land before the units start.
          if (!load_wr) begin
            pv_seen <= 1'b0;
            pq_seen <= '0;
            state   <= S_STEP;
          end
        end
        S_STEP: begin
          if (pv_done) pv_seen <= 1'b1;
          pq_seen <= pq_seen | pq_done;
          if (all_done) state <= S_WRITE;
        end
        S_WRITE: begin
          v[PV_BUS] <= pv_v;
          for (int g = 0; g < N_PQ; g++) v[pq_bus(g)] <= pq_v[g];
          q_pv       <= pv_q;
          q_limited  <= pv_lim;
          if (pv_lim) limit_hits <= limit_hits + 1'b1;
          iter_count <= iter_count + 1'b1;
          state <= (32'(iter_count) == N_ITER - 1) ? S_DONE : S_STEP_GO;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign v_out = v;
  assign busy  = (state != S_IDLE) && (state != S_DONE);
  assign done  = (state == S_DONE);

endmodule
