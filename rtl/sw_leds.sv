// sw_leds: Wishbone slave for the board's switches and LEDs.
//
// A read returns the switches in the low byte (high byte zero); a write with the low
// byte selected sets the LEDs. The slave answers every access with ack one cycle after
// stb rises (one wait state) and keeps ack low for a cycle between accesses, as a
// classic single-transaction slave. Register layout and timing are this design's choice.
module sw_leds
  import zet_pkg::*;
#(
  parameter int unsigned NSW  = 8,
  parameter int unsigned NLED = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  wb_m2s_t         wb_i,
  output wb_s2m_t         wb_o,
  input  logic [NSW-1:0]  sw,
  output logic [NLED-1:0] ledr
);

  logic ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack  <= 1'b0;
      ledr <= '0;
    end else begin
      ack <= wb_i.cyc && wb_i.stb && !ack;
      if (wb_i.cyc && wb_i.stb && !ack && wb_i.we && wb_i.sel[0])
        ledr <= wb_i.dat[NLED-1:0];
    end
  end

  assign wb_o.ack = ack;
  assign wb_o.dat = 16'(sw);

endmodule
