// init_rom: read-only table of the initial complex bus voltages.
//
// The solver starts every run from voltages fixed when the design is built,
// read out of a small ROM. This module holds that table, one Q16.16 complex
// value per bus, as a parameter, and returns entry `addr` one clock cycle
// after it is presented (a registered read, as a block ROM gives). Entries
// past the end read as zero. Keeping the table in a ROM follows the solver's
// description; the synchronous read and the default contents (a flat start,
// 1.0 + j0, at every bus except the voltage-controlled bus 2, which starts at
// its set-point 1.02) are this design's.
module init_rom
  import fxp_pkg::*;
#(
  parameter int unsigned N_BUS = 5,
  parameter cplx_t V_INIT [N_BUS] = '{
    '{32'sd65536, 32'sd0}, '{32'sd65536, 32'sd0}, '{32'sd66847, 32'sd0},
    '{32'sd65536, 32'sd0}, '{32'sd65536, 32'sd0}},
  localparam int unsigned AW = $clog2(N_BUS + 1)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output cplx_t         data
);

  always_ff @(posedge clk) begin
    if (addr < AW'(N_BUS)) data <= V_INIT[addr];
    else                   data <= '0;
  end

endmodule
