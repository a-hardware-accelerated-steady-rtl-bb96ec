// tb_init_rom: self-checking testbench for the initial-voltage ROM.
//
// Gives the ROM its own table, reads every address in order and out of
// order, and checks each word arrives one cycle after its address, and that
// addresses past the end read as zero.
module tb_init_rom;
  import fxp_pkg::*;

  localparam int unsigned N = 5;
  localparam cplx_t TABLE [N] = '{
    '{32'sd65536, 32'sd0}, '{32'sd60000, -32'sd4000}, '{32'sd66847, 32'sd12},
    '{-32'sd7, 32'sd99}, '{32'sd1, -32'sd1}};

  logic clk = 1'b0;
  logic [2:0] addr;
  cplx_t data;
  int checks = 0, failures = 0;

  init_rom #(.N_BUS(N), .V_INIT(TABLE)) dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    for (int i = 0; i < 40; i++) begin
      int a;
      a = (i < 8) ? i : int'($urandom_range(0, 7));
      @(negedge clk) addr = 3'(a);
      @(negedge clk);
      checks++;
      if (data != ((a < N) ? TABLE[a] : cplx_t'('0))) begin
        failures++;
        $display("addr %0d read %h", a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
