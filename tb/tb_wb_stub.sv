// tb_wb_stub: behavioural stand-in for a Wishbone slave that this RTL does not contain
// (flash, UART, keyboard, VGA, SD card). Acknowledges each access one cycle after stb,
// returns the constant DATA on reads and counts the accesses it received.
module tb_wb_stub
  import zet_pkg::*;
#(
  parameter logic [15:0] DATA = 16'h0000
) (
  input  logic    clk,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o
);
  int accesses = 0;
  initial wb_o = '0;
  always @(posedge clk) begin
    wb_o.ack <= wb_i.cyc && wb_i.stb && !wb_o.ack;
    if (wb_i.cyc && wb_i.stb && !wb_o.ack) accesses++;
  end
  assign wb_o.dat = DATA;
endmodule
