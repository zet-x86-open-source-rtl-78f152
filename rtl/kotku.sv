// kotku: the Zet SoC top level.
//
// The Zet processor is the only Wishbone master. A Wishbone switch connects it to the
// seven slaves of the SoC: flash, UART, PS/2 keyboard, switches/LEDs, VGA, the bridge to
// the SDRAM (main RAM) and the SD card. The switches/LEDs slave is inside; the other six
// are outside this RTL, so each gets its own Wishbone port pair on this top (master-to-
// slave bundle out, slave-to-master bundle in). There are three clock domains, as in the
// FPGA SoC: the processor, the switch, flash, UART, keyboard and switches/LEDs run on
// `clk` (12.5 MHz there); the VGA port runs on `clk_vga` (25 MHz) and the RAM bridge and
// SD card ports on `clk_mem` (100 MHz), each reached through a Wishbone async bridge.
// The clock generator (PLL) is outside: the three clocks are inputs.
// `rst` is synchronous to `clk`. The bridges also take it as an asynchronous input and
// synchronize it into each of their clocks, so the net is used both ways on purpose.
module kotku
  import zet_pkg::*;
#(
  parameter logic [15:0] RESET_CS = 16'hF000,
  parameter logic [15:0] RESET_IP = 16'hFFF0
) (
  input  logic    clk,
  input  logic    clk_vga,
  input  logic    clk_mem,
  input  logic    rst,
  input  logic [7:0] sw,
  output logic [7:0] ledr,
  output wb_m2s_t flash_m2s,
  input  wb_s2m_t flash_s2m,
  output wb_m2s_t uart_m2s,
  input  wb_s2m_t uart_s2m,
  output wb_m2s_t ps2_m2s,
  input  wb_s2m_t ps2_s2m,
  output wb_m2s_t vga_m2s,
  input  wb_s2m_t vga_s2m,
  output wb_m2s_t fml_m2s,
  input  wb_s2m_t fml_s2m,
  output wb_m2s_t sd_m2s,
  input  wb_s2m_t sd_s2m,
  output logic    insn_done,
  output logic    lock
);

  wb_m2s_t cpu_m2s;
  wb_s2m_t cpu_s2m;
  wb_m2s_t s_m2s [7];
  wb_s2m_t s_s2m [7];
  wb_s2m_t leds_s2m;

  zet #(.RESET_CS(RESET_CS), .RESET_IP(RESET_IP)) u_zet (
    .clk, .rst, .wb_o(cpu_m2s), .wb_i(cpu_s2m), .insn_done(insn_done), .lock(lock)
  );

  wb_switch #(.NSLAVE(7)) u_switch (
    .clk, .rst, .m_i(cpu_m2s), .m_o(cpu_s2m), .s_o(s_m2s), .s_i(s_s2m)
  );

  sw_leds #(.NSW(8), .NLED(8)) u_leds (
    .clk, .rst, .wb_i(s_m2s[3]), .wb_o(leds_s2m), .sw(sw), .ledr(ledr)
  );

  assign flash_m2s = s_m2s[0];
  assign uart_m2s  = s_m2s[1];
  assign ps2_m2s   = s_m2s[2];

  wb_async_bridge u_vga_bridge (
    .rst, .clk_m(clk), .m_i(s_m2s[4]), .m_o(s_s2m[4]),
    .clk_s(clk_vga), .s_o(vga_m2s), .s_i(vga_s2m)
  );
  wb_async_bridge u_fml_bridge (
    .rst, .clk_m(clk), .m_i(s_m2s[5]), .m_o(s_s2m[5]),
    .clk_s(clk_mem), .s_o(fml_m2s), .s_i(fml_s2m)
  );
  wb_async_bridge u_sd_bridge (
    .rst, .clk_m(clk), .m_i(s_m2s[6]), .m_o(s_s2m[6]),
    .clk_s(clk_mem), .s_o(sd_m2s), .s_i(sd_s2m)
  );

  assign s_s2m[0] = flash_s2m;
  assign s_s2m[1] = uart_s2m;
  assign s_s2m[2] = ps2_s2m;
  assign s_s2m[3] = leds_s2m;

endmodule
