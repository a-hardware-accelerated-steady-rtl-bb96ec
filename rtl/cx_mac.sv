// cx_mac: sequential complex multiply-and-add over a range of buses.
//
// Computes acc = sum over n in [lo, hi) of y_row[n] * v[n], one complex
// product per clock cycle, with Q16.16 operands. A regular-bus update uses two
// of these side by side, one for the buses numbered below its own and one for
// those above it; the voltage-controlled bus update uses one over all buses to
// form its injected current. That split is the solver's; one product per
// cycle, the index range as an input and the handshake are this design's.
//
// Interface: pulse `start` while idle; `y_row` and `v` must stay stable until
// `done`. `done` pulses (hi - lo) + 1 cycles after start (1 cycle for an empty
// range) with `acc` valid; `acc` holds until the next start.
module cx_mac
  import fxp_pkg::*;
#(
  parameter int unsigned N_BUS = 5,
  localparam int unsigned IW   = $clog2(N_BUS + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic [IW-1:0] lo,
  input  logic [IW-1:0] hi,
  input  cplx_t   y_row [N_BUS],
  input  cplx_t   v     [N_BUS],
  output logic    busy,
  output logic    done,
  output cplx_t   acc
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;
  logic [IW-1:0] idx, last;

  cplx_t prod;
  always_comb begin
    prod = '0;
    if (idx < IW'(N_BUS)) prod = cx_mul(y_row[idx], v[idx]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      last  <= '0;
      acc   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          acc  <= '0;
          idx  <= lo;
          last <= hi - 1'b1;
          state <= (lo < hi) ? S_RUN : S_DONE;
        end
        S_RUN: begin
          acc <= cx_add(acc, prod);
          idx <= idx + 1'b1;
          if (idx == last) state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);
  assign done = (state == S_DONE);

endmodule
