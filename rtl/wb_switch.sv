// wb_switch: Wishbone interconnect from the Zet master to the SoC's seven slaves.
//
// Decodes each transaction's address and space (tga: 0 memory, 1 IO) to one slave,
// forwards the master's signals to it with cyc and stb gated to that slave only, and
// returns that slave's data and ack. Slaves in index order: 0 flash, 1 UART, 2 PS/2
// keyboard, 3 switches/LEDs, 4 VGA, 5 FML bridge to RAM, 6 SD card. The address map is this
// design's choice, modelled on the PC: memory A0000-BFFFF is VGA, all other memory is RAM;
// IO ports 0238-023F flash, 03F8-03FF UART, 0060-0067 keyboard, F100-F101 switches/LEDs,
// 03C0-03DF VGA, 0100-0101 SD card. An IO access to an unmapped port is answered by the
// switch itself one cycle later with all-ones data, so the master never hangs.
// Purely combinational except for that default answer.
module wb_switch
  import zet_pkg::*;
#(
  parameter int unsigned NSLAVE = 7
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t m_i,
  output wb_s2m_t m_o,
  output wb_m2s_t s_o [NSLAVE],
  input  wb_s2m_t s_i [NSLAVE]
);

  localparam int S_FLASH = 0, S_UART = 1, S_PS2 = 2, S_LEDS = 3, S_VGA = 4, S_FML = 5, S_SD = 6;

  logic [19:0] badr;
  logic [15:0] port;
  int          sel;       // selected slave, -1 for none
  logic        def_ack;

  assign badr = {m_i.adr, 1'b0};
  assign port = badr[15:0];

  always_comb begin
    sel = -1;
    if (!m_i.tga) begin
      sel = (badr >= 20'hA0000 && badr <= 20'hBFFFF) ? S_VGA : S_FML;
    end else begin
      if      (port >= 16'h0238 && port <= 16'h023F) sel = S_FLASH;
      else if (port >= 16'h03F8 && port <= 16'h03FF) sel = S_UART;
      else if (port >= 16'h0060 && port <= 16'h0067) sel = S_PS2;
      else if (port >= 16'hF100 && port <= 16'hF101) sel = S_LEDS;
      else if (port >= 16'h03C0 && port <= 16'h03DF) sel = S_VGA;
      else if (port >= 16'h0100 && port <= 16'h0101) sel = S_SD;
    end
  end

  always_comb begin
    for (int i = 0; i < NSLAVE; i++) begin
      s_o[i]     = m_i;
      s_o[i].cyc = m_i.cyc && (sel == i);
      s_o[i].stb = m_i.stb && (sel == i);
    end
    m_o = '{dat: 16'hFFFF, ack: def_ack};
    for (int i = 0; i < NSLAVE; i++)
      if (sel == i) m_o = s_i[i];
  end

  always_ff @(posedge clk) begin
    if (rst) def_ack <= 1'b0;
    else     def_ack <= m_i.cyc && m_i.stb && (sel < 0) && !def_ack;
  end

endmodule
